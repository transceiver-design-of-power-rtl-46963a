// johnson_clkgen: three-phase chip clock from a 3-bit Johnson counter.
//
// Three flip-flops in a twisted ring (the inverted last stage feeds the
// first) count through six states, so each output is a square wave at 1/6
// of clk. Following the document's Fig. 4-9, Ph0 is the first stage, Ph1 the
// third stage and Ph2 the inverted second stage; their rising edges fall
// 2 clk cycles (1/3 chip) apart, in the order Ph0, Ph1, Ph2. With the
// document's 66 MHz clock this gives three 11 MHz phases; in its FPGA build
// (50 MHz / 32 = 1.5625 MHz) a 260 kHz chip rate.
module johnson_clkgen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] ph      // ph[k] = Phk
);

  logic [2:0] j;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) j <= '0;
    else        j <= {j[1:0], ~j[2]};
  end

  // j[0] rises in state 1, j[2] in state 3, ~j[1] in state 5.
  assign ph = {~j[1], j[2], j[0]};

endmodule
