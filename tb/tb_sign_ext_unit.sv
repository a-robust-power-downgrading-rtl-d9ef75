// tb_sign_ext_unit: checks the sign-extension unit.
// (1) MSP open (close = 1, sign = carr_ctrl = 0): the pseudo-sum passes
//     unchanged for random pseudo-sums.
// (2) MSP closed (close = 0, pseudo-sum 0): the output is the MSP sum of
//     each sign-extension operand pair plus carry, worked out by integer
//     addition, with sign = its top bit and carr_ctrl = its bit 0.
// (3) A set sign bit has no effect while close = 1.
module tb_sign_ext_unit;
  localparam int unsigned W = 8;
  int           checks = 0, failures = 0;
  logic [W-1:0] ps, sum;
  logic         close, sign, carr_ctrl;

  sign_ext_unit #(.W(W)) dut (.ps, .close, .sign, .carr_ctrl, .sum);

  task automatic check(logic [W-1:0] exp);
    #1;
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("FAIL ps=%h close=%0b sign=%0b carr=%0b sum=%h expected %h",
               ps, close, sign, carr_ctrl, sum, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    close = 1; sign = 0; carr_ctrl = 0;
    for (int n = 0; n < 500; n++) begin
      ps = W'($urandom);
      check(ps);
    end
    close = 0; ps = '0;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++)
        for (int c = 0; c < 2; c++) begin
          logic [W-1:0] av, bv, exp;
          av = (a != 0) ? '1 : '0;
          bv = (b != 0) ? '1 : '0;
          exp = av + bv + W'(c);
          sign = exp[W-1]; carr_ctrl = exp[0];
          check(exp);
        end
    close = 1; sign = 1; carr_ctrl = 0;
    for (int n = 0; n < 100; n++) begin
      ps = W'($urandom);
      check(ps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
