// tb_msp_operand_latch: the isolated operand must equal the input while
// close = 1 and be all zeros while close = 0, for random operands.
module tb_msp_operand_latch;
  localparam int unsigned W = 8;
  int           checks = 0, failures = 0;
  logic         close;
  logic [W-1:0] d, q;

  msp_operand_latch #(.W(W)) dut (.close, .d, .q);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] exp;
      d     = W'($urandom);
      close = 1'($urandom);
      #1;
      exp = 0;
      if (close) exp = d;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL close=%0b d=%h q=%h", close, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
