// phase_shift_fsm: lock decision of the code-acquisition loop.
//
// Evaluated once per data bit (en = punctual correlator dump) on the
// threshold-detector output td. Mealy machine from the document's state
// diagram (input/output on each arc):
//   St0: 0/0 -> St0, 1/0 -> St1
//   St1: 0/0 -> St0, 1/1 -> St2
//   St2: 0/1 -> St1, 1/1 -> St2
// So the code counts as aligned after two passing bits in a row, and is
// only given up after two failing bits in a row, which rides through a
// single noisy bit. The arc output is registered here: select (also the
// enable of the tracking loop) is valid from the cycle after en.
module phase_shift_fsm
  import dsss_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic td,
  output logic select
);

  ps_state_t state, state_nx;
  logic      out_nx;

  always_comb begin
    state_nx = state;
    out_nx   = 1'b0;
    unique case (state)
      PS_ST0: begin state_nx = td ? PS_ST1 : PS_ST0; out_nx = 1'b0; end
      PS_ST1: begin state_nx = td ? PS_ST2 : PS_ST0; out_nx = td;   end
      PS_ST2: begin state_nx = td ? PS_ST2 : PS_ST1; out_nx = 1'b1; end
      default: begin state_nx = PS_ST0; out_nx = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= PS_ST0;
      select <= 1'b0;
    end else if (en) begin
      state  <= state_nx;
      select <= out_nx;
    end
  end

endmodule
