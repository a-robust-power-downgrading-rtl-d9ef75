// tb_rpdt_fig1_cases: the five spurious-transition situations of a 16-bit
// addition split at bit 8, run on a 16-bit RPDT adder (8-bit MSP, 8-bit
// modulo 2^8+1 LSP).
//
// For each situation the operands are the 16-bit two's complement numbers
// of the analysis; the carry out of the low byte is the LSP carry C7. Each
// must close the MSP, and the upper result byte must be the one of the
// plain two's complement sum (which the MSP reproduces from sign and
// carr-ctrl alone). The lower byte is the diminished-1 modulo 2^8+1 sum.
// The first situation is applied as a change of operands while the MSP
// stays closed: the decision (and so the MSP output) must not change.
module tb_rpdt_fig1_cases;

  int          checks = 0, failures = 0;
  logic        close_clk = 0, rst_n = 1;
  logic [15:0] a = '0, b = '0, sum;
  logic        cout, c_lsp, close, sign, carr_ctrl;

  rpdt_adder #(.MSP_W(8), .LSP_W(8)) dut (.*);

  always #5 close_clk = ~close_clk;

  task automatic run(string name, int x, int y);
    int unsigned lo, c, tw;
    @(negedge close_clk);
    a = 16'(x); b = 16'(y);
    @(posedge close_clk);
    #1;
    lo = int'(a[7:0]) + int'(b[7:0]);
    c  = lo >> 8;
    lo = (lo + (c ^ 1)) & 32'hff;
    tw = (int'(a) + int'(b)) & 32'hffff;   // two's complement sum
    checks += 4;
    if (close !== 1'b0) begin
      failures++;
      $display("FAIL %s: MSP not closed", name);
    end
    if (c_lsp !== 1'(c)) begin
      failures++;
      $display("FAIL %s: C7 %0b expected %0b", name, c_lsp, c);
    end
    if (sum[15:8] !== 8'(tw >> 8)) begin
      failures++;
      $display("FAIL %s: upper byte %h expected %h", name, sum[15:8], 8'(tw >> 8));
    end
    if (sum[7:0] !== 8'(lo)) begin
      failures++;
      $display("FAIL %s: LSP %h expected %h", name, sum[7:0], 8'(lo));
    end
    $display("%s: %0d + %0d -> MSP byte %h (close=%0b sign=%0b carr-ctrl=%0b)",
             name, $signed(a), $signed(b), sum[15:8], close, sign, carr_ctrl);
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge close_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #10 rst_n = 1;
    run("case 1a", 128, 64);
    begin
      logic [2:0] held;
      held = {close, sign, carr_ctrl};
      @(negedge close_clk);
      a = 16'hff80; b = 16'd192;                 // -128 + 192
      #1;
      checks += 2;
      if ({close, sign, carr_ctrl} !== held) failures++;
      if (sum[15:8] !== 8'h00) begin
        failures++;
        $display("FAIL case 1: MSP output moved before the edge");
      end
    end
    run("case 1b", -128, 192);
    run("case 2", -61, 51);
    run("case 3", -196, 204);
    run("case 4", -61, -205);
    run("case 5", -196, -52);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
