// tb_abs_value: the absolute-value circuit against its truth table
// (X = 11..0 -> Y = 11, 9, 7, 5, 3, 1, 1, 3, 5, 7, 9, 11).
module tb_abs_value;
  logic [3:0] x, y;
  int checks = 0, failures = 0;
  localparam logic [3:0] TABLE [12] = '{4'd11, 4'd9, 4'd7, 4'd5, 4'd3, 4'd1,
                                        4'd1, 4'd3, 4'd5, 4'd7, 4'd9, 4'd11};

  abs_value dut (.x, .y);

  initial begin
    for (int i = 0; i < 12; i++) begin
      x = 4'(11 - i);
      #1;
      checks++;
      if (y !== TABLE[i]) begin failures++; $display("FAIL x=%0d y=%0d want %0d", x, y, TABLE[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
