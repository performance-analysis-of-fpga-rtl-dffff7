// fir_ctrl - program counter and sequencer for one FIR output on a single MAC unit.
//
// Idle until `start`. The start cycle clears the accumulator (clr) and sets the program counter
// to 0. Then TAPS accumulate cycles follow (acc_en high); in each the program counter selects
// coefficient h(pc) and the sample source must present x(n-pc). After the last tap one cycle
// with y_valid high presents the result, and the sequencer is idle again. `start` is ignored
// while busy.
// Timing: start in cycle 0, accumulate in cycles 1..TAPS, y_valid in cycle TAPS+1.
// Stepping a program counter over the coefficient table and starting the accumulator from zero
// follow the original architecture; the start/busy/y_valid handshake is this implementation's.
module fir_ctrl #(
  parameter int TAPS = 8,
  parameter int PCW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic [PCW-1:0] pc,
  output logic           clr,
  output logic           acc_en,
  output logic           y_valid,
  output logic           busy
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          pc    <= '0;
        end
        S_RUN: begin
          if (pc == PCW'(TAPS - 1)) state <= S_DONE;
          else                      pc    <= pc + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign clr     = (state == S_IDLE) && start;
  assign acc_en  = (state == S_RUN);
  assign y_valid = (state == S_DONE);
  assign busy    = (state != S_IDLE);

  pc_in_range: assert property (@(posedge clk) disable iff (!rst_n) acc_en |-> (int'(pc) < TAPS));
endmodule
