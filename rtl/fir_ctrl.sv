// fir_ctrl: step counter and sequencing of the FIR core.
//
// The counter steps through 0..N-1 once per filter output; its value
// addresses the coefficient ROM and the offset look-up table together, so
// each cycle one coefficient and its matching data sample are fetched into
// h_reg and x_reg. The rest of this block times the pipeline around the
// counter. The sequence of operations is the published one: fetch and
// multiply-accumulate all taps, take the output from the accumulator, clear
// the accumulator, step the write pointer back, write the next sample. The
// state machine, the handshake and the clearing of the data memory after
// reset are this design's choices:
//
//   INIT  : after reset, N cycles writing zero to the data memory while the
//           write pointer steps round the whole buffer (ends where it began).
//   IDLE  : in_ready = 1. A sample offered with in_valid is written at the
//           write pointer in this cycle and the core moves to RUN.
//   RUN   : N cycles, cnt = 0..N-1, fetch_en = 1.
//   DRAIN : waits while the last product is accumulated (1 cycle) and the
//           accumulator is copied to out_reg (1 cycle); the write pointer is
//           decremented in that same cycle. Then IDLE.
//
// Timing: mac_en/mac_clr are fetch_en/"cnt == 0" delayed by one cycle,
// out_load comes two cycles after the last fetch and y_valid one cycle after
// out_load, when out_reg shows the new output. With in_valid held high the
// core accepts one sample every N + 3 cycles and y_valid rises N + 3 cycles
// after the cycle that accepted the sample.
module fir_ctrl #(
  parameter int N  = 80,
  parameter int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          x_we,       // write x_ram at the write pointer
  output logic          x_zero,     // write data is zero (memory clearing)
  output logic          wp_dec,     // step the write pointer back by one
  output logic [AW-1:0] cnt,        // step counter (h_rom / LUT address)
  output logic          fetch_en,   // load h_reg and x_reg
  output logic          mac_en,     // accumulate h_reg * x_reg
  output logic          mac_clr,    // first product: accumulate onto zero
  output logic          out_load,   // copy accumulator into out_reg
  output logic          y_valid     // out_reg holds a new output
);

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e state;
  logic   last_d;
  logic   cnt_last;

  assign cnt_last = (cnt == AW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_INIT: begin
          cnt <= cnt_last ? '0 : cnt + 1'b1;
          if (cnt_last) state <= S_IDLE;
        end
        S_IDLE: begin
          if (in_valid) state <= S_RUN;
        end
        S_RUN: begin
          cnt <= cnt_last ? '0 : cnt + 1'b1;
          if (cnt_last) state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (out_load) state <= S_IDLE;
        end
        default: state <= S_INIT;
      endcase
    end
  end

  always_comb begin
    in_ready = (state == S_IDLE);
    x_zero   = (state == S_INIT);
    x_we     = x_zero || (in_ready && in_valid);
    fetch_en = (state == S_RUN);
    wp_dec   = x_zero || out_load;
  end

  // Pipeline timing of the multiply-accumulate and the output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_en   <= 1'b0;
      mac_clr  <= 1'b0;
      last_d   <= 1'b0;
      out_load <= 1'b0;
      y_valid  <= 1'b0;
    end else begin
      mac_en   <= fetch_en;
      mac_clr  <= fetch_en && (cnt == '0);
      last_d   <= fetch_en && cnt_last;
      out_load <= last_d;
      y_valid  <= out_load;
    end
  end

endmodule
