// tb_detection_logic: checks the MSP detection logic.
//
// Operands are drawn so that about half are sign extensions (all zeros or
// all ones). After each rising close_clk edge the registered outputs must
// match the reference: close = 0 exactly when both operands are sign
// extensions; then the MSP sum A+B+C (integer addition) must be sign
// repeated on bits 7..1 with carr_ctrl on bit 0; otherwise sign and
// carr_ctrl are 0. Also checked: reset values, that the registered outputs
// do not move between edges, and the unregistered A_and / B_and flags.
// Each closed class (both zero, one all-ones, both all-ones, with and
// without carry) is counted and must occur.
module tb_detection_logic;
  localparam int unsigned W = 8;

  int           checks = 0, failures = 0;
  int           seen [6];
  logic         close_clk = 0, rst_n = 1;
  logic [W-1:0] a_msp = '0, b_msp = '0;
  logic         c_lsp = 0;
  logic         a_and, b_and, close, carr_ctrl, sign;

  detection_logic #(.W(W)) dut (.*);

  always #5 close_clk = ~close_clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h c=%0b got %0b expected %0b", what, a_msp, b_msp, c_lsp, got, exp);
    end
  endtask

  function automatic logic [W-1:0] pick();
    case ($urandom_range(3))
      0:       return '0;
      1:       return '1;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge close_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    check("reset close", close, 1'b1);
    check("reset sign", sign, 1'b0);
    check("reset carr", carr_ctrl, 1'b0);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic         a_se, b_se, exp_close;
      logic [W:0]   t;
      logic         old_close, old_sign, old_carr;
      @(negedge close_clk);
      a_msp = pick(); b_msp = pick(); c_lsp = 1'($urandom);
      @(posedge close_clk);
      #1;
      a_se = (a_msp == '0) || (a_msp == '1);
      b_se = (b_msp == '0) || (b_msp == '1);
      exp_close = !(a_se && b_se);
      t = {1'b0, a_msp} + {1'b0, b_msp} + (W+1)'(c_lsp);
      check("close", close, exp_close);
      check("a_and", a_and, a_msp == '1);
      check("b_and", b_and, b_msp == '1);
      if (!exp_close) begin
        check("sign", sign, t[W-1]);
        check("carr", carr_ctrl, t[0]);
        checks++;
        if (t[W-1:1] != {(W-1){t[W-1]}}) begin
          failures++;
          $display("FAIL reference: closed MSP sum %h is not a sign pattern", t[W-1:0]);
        end
        seen[(int'(a_msp == '1) + int'(b_msp == '1)) * 2 + int'(c_lsp)]++;
      end else begin
        check("sign open", sign, 1'b0);
        check("carr open", carr_ctrl, 1'b0);
      end
      // change inputs between edges: registered outputs must hold
      old_close = close; old_sign = sign; old_carr = carr_ctrl;
      a_msp = pick(); b_msp = pick(); c_lsp = 1'($urandom);
      #2;
      check("hold close", close, old_close);
      check("hold sign", sign, old_sign);
      check("hold carr", carr_ctrl, old_carr);
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL closed class %0d never seen", i);
      end
    end
    // asynchronous reset re-opens the MSP
    @(negedge close_clk);
    a_msp = '0; b_msp = '0;
    @(posedge close_clk); #1;
    check("closed before reset", close, 1'b0);
    rst_n = 0; #1;
    check("async reset close", close, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
