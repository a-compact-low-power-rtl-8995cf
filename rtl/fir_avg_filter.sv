// fir_avg_filter: one reconfigurable filter shared by all three channels.
//
// A 64-tap FIR and a 512-sample window average are both a sum of k products
// C_i * D_i, so one multiply-accumulate unit computes either, one product per
// clock:
//   FIR mode (avg_mode = 0): din is written into the channel's 64-entry delay
//     line in the shared FIR RAM (channel offset added by ram_offset_calc),
//     then the 64 newest samples are multiplied by the channel's coefficients.
//     Only 32 coefficients per channel are stored; tap i uses coefficient
//     min(i, 63 - i) at ROM offset 0 / 32 / 64. The 16-bit sum, shifted right
//     by 7 (Q1.7 coefficients) and saturated to 8 bits, is the result.
//   AVG mode (avg_mode = 1): if wr_win is set, |din| (saturated to 127) is
//     written over the oldest entry of the channel's 512-entry window RAM;
//     then all 512 entries are summed with coefficient 1 and the sum / 512 is
//     the result (0..127).
// The coefficient mux (ROM coefficient or constant 1), the RAM selection mux
// and the data in/out mux of the reference filter diagram are written out
// below. After reset the block clears all four RAMs (512 cycles, busy high).
//
// Interface: pulse start for one cycle while busy is low, with avg_mode, chan,
// wr_win and din valid in that cycle. done pulses one cycle with dout valid;
// dout holds until the next run. Timing, from the clock edge that takes
// start to the edge after which done is high: FIR 68 cycles (1 accept,
// 1 write, 64 products, 2 pipeline); AVG 516 cycles with wr_win, 515 without.
// The structure, sizes and the two modes are the reference design's; the output
// scaling, the magnitude taken before averaging, the reset-time clear and the
// handshake are this design's own choices.
module fir_avg_filter
  import sleep_pkg::*;
#(
  parameter int unsigned TAPS      = FIR_TAPS,
  parameter int unsigned WIN_LEN   = AVG_LEN,
  parameter int unsigned COEF_FRAC = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     avg_mode,
  input  channel_e                 chan,
  input  logic                     wr_win,
  input  logic signed [DATA_W-1:0] din,
  output logic        [DATA_W-1:0] dout,
  output logic                     done,
  output logic                     busy
);

  localparam int unsigned TAP_AW = $clog2(TAPS);
  localparam int unsigned CNT_W  = RAM_AW + 1;

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_WRITE, S_RUN, S_FLUSH, S_OUT} state_e;

  state_e   state;
  logic     mode_q;
  channel_e chan_q;
  logic signed [DATA_W-1:0] din_q;
  logic [CNT_W-1:0] idx;
  logic [TAP_AW-1:0] wp [N_CHAN];   // newest FIR sample per channel
  logic [RAM_AW-1:0] ap [N_CHAN];   // next window entry to overwrite

  // ---------------- address and write generation ----------------
  logic [RAM_AW-1:0] local_addr, fir_addr, avg_addr;
  logic              fir_we;
  logic [N_CHAN-1:0] avg_we;
  logic [DATA_W-1:0] fir_wdata, avg_wdata;
  logic [DATA_W-1:0] mag;
  logic [TAP_AW-1:0] tap, coef_idx;
  logic [ROM_AW-1:0] rom_addr, rom_offset;
  logic              issue;        // a product's operands are read this cycle

  always_comb begin
    mag = (din_q[DATA_W-1] && din_q[DATA_W-2:0] == '0) ? DATA_W'(127)
        : (din_q[DATA_W-1] ? DATA_W'(-din_q) : DATA_W'(din_q));
    tap      = TAP_AW'(idx);
    coef_idx = (idx < CNT_W'(TAPS / 2)) ? tap : TAP_AW'(TAPS - 1) - tap;
    // OFFSET MUX: coefficient set of the channel
    unique case (chan_q)
      CH_EEG1: rom_offset = ROM_AW'(0);
      CH_EEG2: rom_offset = ROM_AW'(TAPS / 2);
      CH_EMG:  rom_offset = ROM_AW'(TAPS);
      default: rom_offset = '0;
    endcase
    rom_addr = ROM_AW'(coef_idx) + rom_offset;

    issue     = (state == S_RUN);
    fir_we    = 1'b0;
    avg_we    = '0;
    fir_wdata = din_q;
    avg_wdata = mag;
    local_addr = '0;
    avg_addr   = '0;
    if (state == S_CLEAR) begin
      fir_we     = 1'b1;
      avg_we     = '1;
      fir_wdata  = '0;
      avg_wdata  = '0;
      local_addr = RAM_AW'(idx);
      avg_addr   = RAM_AW'(idx);
    end else if (state == S_WRITE) begin
      if (!mode_q) begin
        fir_we     = 1'b1;
        local_addr = RAM_AW'(wp[chan_q]);
      end else begin
        avg_we[chan_q] = 1'b1;
        avg_addr       = ap[chan_q];
      end
    end else begin
      // FIR tap i reads sample n - i; AVG reads entry i
      local_addr = RAM_AW'(TAP_AW'(wp[chan_q] - tap));
      avg_addr   = RAM_AW'(idx);
    end
  end

  // RAM SELECTION MUX (FIR path through the offset adder)
  ram_offset_calc #(.AW(RAM_AW), .SEG(TAPS)) u_offset (
    .chan    (chan_q),
    .stage   (state != S_CLEAR),
    .addr_in (local_addr),
    .addr_out(fir_addr)
  );

  logic [DATA_W-1:0] fir_rdata;
  logic [DATA_W-1:0] avg_rdata [N_CHAN];

  filter_ram #(.AW(RAM_AW), .DW(DATA_W)) u_fir_ram (
    .clk, .we(fir_we), .addr(fir_addr), .wdata(fir_wdata), .rdata(fir_rdata)
  );

  for (genvar c = 0; c < N_CHAN; c++) begin : g_avg_ram
    filter_ram #(.AW(RAM_AW), .DW(DATA_W)) u_avg_ram (
      .clk, .we(avg_we[c]), .addr(avg_addr), .wdata(avg_wdata), .rdata(avg_rdata[c])
    );
  end

  logic [COEF_W-1:0] rom_coeff;
  coeff_flashrom #(.AW(ROM_AW), .DW(COEF_W), .DEPTH(3 * TAPS / 2)) u_rom (
    .clk, .addr(rom_addr), .coeff(rom_coeff)
  );

  // ---------------- data / coefficient muxes and MAC ----------------
  logic issue_q, first_q, first_d;
  logic signed [DATA_W-1:0] mac_data;
  logic signed [COEF_W-1:0] mac_coeff;
  logic signed [ACC_W-1:0]  acc;

  always_comb begin
    // DATA INPUT / OUTPUT MUX
    mac_data  = mode_q ? avg_rdata[chan_q] : fir_rdata;
    // COEFFICIENT MUX: FIR coefficient or constant one
    mac_coeff = mode_q ? COEF_W'(1) : rom_coeff;
    first_d   = issue && (idx == '0);
  end

  mac_unit #(.DW(DATA_W), .PW(PROD_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .clr(first_q), .en(issue_q), .coeff(mac_coeff), .data(mac_data), .acc
  );

  // ---------------- result scaling ----------------
  logic signed [ACC_W-1:0] fir_shift;
  logic        [DATA_W-1:0] fir_res, avg_res;

  always_comb begin
    fir_shift = acc >>> COEF_FRAC;
    if (fir_shift > ACC_W'(127))       fir_res = 8'h7F;
    else if (fir_shift < -ACC_W'(128)) fir_res = 8'h80;
    else                               fir_res = DATA_W'(fir_shift);
    avg_res = DATA_W'($unsigned(acc) >> $clog2(WIN_LEN));
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLEAR;
      idx     <= '0;
      mode_q  <= 1'b0;
      chan_q  <= CH_EEG1;
      din_q   <= '0;
      dout    <= '0;
      done    <= 1'b0;
      issue_q <= 1'b0;
      first_q <= 1'b0;
      for (int c = 0; c < N_CHAN; c++) begin
        wp[c] <= '0;
        ap[c] <= '0;
      end
    end else begin
      done    <= 1'b0;
      issue_q <= issue;
      first_q <= first_d;
      unique case (state)
        S_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == CNT_W'(WIN_LEN - 1)) begin
            idx   <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (start) begin
            mode_q <= avg_mode;
            chan_q <= chan;
            din_q  <= din;
            idx    <= '0;
            state  <= (avg_mode && !wr_win) ? S_RUN : S_WRITE;
            if (!avg_mode) wp[chan] <= wp[chan] + 1'b1;
          end
        end
        S_WRITE: begin
          if (mode_q) ap[chan_q] <= ap[chan_q] + 1'b1;
          state <= S_RUN;
        end
        S_RUN: begin
          idx <= idx + 1'b1;
          if (idx == (mode_q ? CNT_W'(WIN_LEN - 1) : CNT_W'(TAPS - 1))) state <= S_FLUSH;
        end
        S_FLUSH: state <= S_OUT;     // last product enters the sum
        S_OUT: begin
          dout  <= mode_q ? avg_res : fir_res;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // start is only accepted while idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
