// tb_msp_ordinary_adder: exhaustive check of the 8-bit MSP adder against
// integer addition, sum and carry-out, for both carry-ins.
module tb_msp_ordinary_adder;
  localparam int unsigned W = 8;
  int           checks = 0, failures = 0;
  logic [W-1:0] a, b, ps;
  logic         cin, cout;

  msp_ordinary_adder #(.W(W)) dut (.a, .b, .cin, .ps, .cout);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int c = 0; c < 2; c++) begin
          int unsigned t;
          a = W'(i); b = W'(j); cin = 1'(c);
          #1;
          t = i + j + c;
          checks++;
          if (ps !== W'(t) || cout !== 1'(t >> W)) begin
            failures++;
            $display("FAIL %h+%h+%0d = %0b,%h", a, b, cin, cout, ps);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
