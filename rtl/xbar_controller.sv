// Sequencer of one crossbar VMM.
//
// A VMM over ROWS_P inputs of IN_B bits is done in IN_B * GROUPS steps, one
// per (input bit t, wordline group g), GROUPS = ROWS_P/M; g runs fastest.
// Each step takes BL_P + 2 clocks:
//   SAMPLE  drive bit t of the m inputs of group g onto their wordlines and
//           capture all bitline currents in the sample-and-holds (1 clock);
//   CONV    convert bitline 0 .. BL_P-1, one per clock, through the ADC; the
//           shift-and-add unit, the offset register file and the shared
//           offset multiplier consume them one clock later (BL_P clocks);
//   DRAIN   let the last conversion reach the shift-and-add unit (1 clock).
// A `start` pulse in IDLE clears the results and begins; `done` is high for
// one clock after the last step, so start-to-done is
// IN_B*GROUPS*(BL_P+2) + 1 clocks. The Sum+Multi work is done inside the
// conversion of each step, so the offset adds no clock to a VMM.
// The step order and the exact cycle schedule are this design's choices.
module xbar_controller
  import dofs_pkg::*;
#(
  parameter int ROWS_P = ROWS,
  parameter int BL_P   = BITLINES,
  parameter int IN_B   = INPUT_BITS,
  parameter int M      = M_SHARE,
  parameter int GROUPS = ROWS_P / M
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  output logic                         clear,
  output logic                         drive,
  output logic                         sample,
  output logic [$clog2(GROUPS+1)-1:0]  grp,
  output logic [$clog2(IN_B)-1:0]      bit_sel,
  output logic                         conv,
  output logic [$clog2(BL_P)-1:0]      conv_col
);

  typedef enum logic [2:0] {S_IDLE, S_SAMPLE, S_CONV, S_DRAIN, S_FIN} state_t;

  state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      grp      <= '0;
      bit_sel  <= '0;
      conv_col <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_SAMPLE;
          grp     <= '0;
          bit_sel <= '0;
        end
        S_SAMPLE: begin
          state    <= S_CONV;
          conv_col <= '0;
        end
        S_CONV: begin
          if (int'(conv_col) == BL_P - 1) state <= S_DRAIN;
          else conv_col <= conv_col + 1'b1;
        end
        S_DRAIN: begin
          if (int'(grp) == GROUPS - 1) begin
            grp <= '0;
            if (int'(bit_sel) == IN_B - 1) state <= S_FIN;
            else begin
              bit_sel <= bit_sel + 1'b1;
              state   <= S_SAMPLE;
            end
          end else begin
            grp   <= grp + 1'b1;
            state <= S_SAMPLE;
          end
        end
        S_FIN:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy   = (state != S_IDLE);
  assign done   = (state == S_FIN);
  assign clear  = (state == S_IDLE) && start;
  assign drive  = (state == S_SAMPLE);
  assign sample = (state == S_SAMPLE);
  assign conv   = (state == S_CONV);

  // The group index never leaves its range while a VMM runs.
  a_grp_range: assert property (@(posedge clk) disable iff (!rst_n)
                                busy |-> int'(grp) < GROUPS);

endmodule
