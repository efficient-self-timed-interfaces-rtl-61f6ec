// tb_stage_reg: checks that a data stage captures its input on the rising
// clock edge and holds it for the rest of the cycle.
`timescale 1ps/1ps
module tb_stage_reg;
  localparam int unsigned WIDTH = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [WIDTH-1:0] d, q, expect_q;

  stage_reg #(.WIDTH(WIDTH)) dut (.clk(clk), .d(d), .q(q));

  initial begin
    d = '0;
    repeat (200) begin
      #400 d = WIDTH'($urandom);
      #100 clk = 1'b1;  expect_q = d;
      #100 d = WIDTH'($urandom);          // change after the edge: no effect
      #100 checks++;
      if (q !== expect_q) begin
        failures++;
        $display("FAIL: q=%h expected %h", q, expect_q);
      end
      clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
