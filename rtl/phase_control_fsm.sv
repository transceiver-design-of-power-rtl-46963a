// phase_control_fsm: selects which of the three clock phases is Ph+.
//
// Three one-hot states C0, C1, C2 whose state vector is also the mux select
// (the document encodes the FSM one-hot and uses the state as its output).
// Transitions follow the document's state diagram: lead_ov moves C0->C1->
// C2->C0, which picks a phase 1/3 chip later (the local code is delayed);
// lag_ov moves C0->C2->C1->C0, picking a phase 1/3 chip earlier.
// The state only changes on a clock with en high; the receiver drives en
// with the Ph+ edge strobe so that a rotation happens right at a chip
// boundary. If lead_ov and lag_ov were both high the state would hold (the
// two never coincide in this design).
module phase_control_fsm
  import dsss_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       lead_ov,
  input  logic       lag_ov,
  output logic [2:0] sel       // one-hot C2..C0
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel <= PC_C0;
    else if (en) begin
      if (lead_ov && !lag_ov)      sel <= {sel[1:0], sel[2]};
      else if (lag_ov && !lead_ov) sel <= {sel[0], sel[2:1]};
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel));

endmodule
