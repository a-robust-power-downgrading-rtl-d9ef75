// tb_msp_adder: checks the complete MSP (detection, isolation, adder, SE
// unit and carry-out network).
//
// Each step applies new MSP operands and an LSP carry, waits for a rising
// close_clk edge, and compares sum_msp and cout with the integer sum
// A + B + C. Operands are drawn so that both the closed (both operands sign
// extensions) and open paths occur often, and every closed class and both
// mode switches (open -> closed, closed -> open) are counted and required.
// While closed, the adder's isolated inputs must be zero (checked through
// the hierarchy).
module tb_msp_adder;
  localparam int unsigned W = 8;

  int           checks = 0, failures = 0;
  int           n_open = 0, n_to_closed = 0, n_to_open = 0;
  int           seen [6];
  logic         close_clk = 0, rst_n = 1;
  logic [W-1:0] a_msp = '0, b_msp = '0, sum_msp;
  logic         c_lsp = 0, cout, close, sign, carr_ctrl;

  msp_adder #(.W(W)) dut (.*);

  always #5 close_clk = ~close_clk;

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
    logic prev_close;
    #1 rst_n = 0;
    #11 rst_n = 1;
    prev_close = 1;
    for (int n = 0; n < 20000; n++) begin
      logic [W:0] t;
      @(negedge close_clk);
      a_msp = pick(); b_msp = pick(); c_lsp = 1'($urandom);
      @(posedge close_clk);
      #1;
      t = {1'b0, a_msp} + {1'b0, b_msp} + (W+1)'(c_lsp);
      checks++;
      if (sum_msp !== t[W-1:0] || cout !== t[W]) begin
        failures++;
        $display("FAIL a=%h b=%h c=%0b close=%0b got %0b,%h expected %0b,%h",
                 a_msp, b_msp, c_lsp, close, cout, sum_msp, t[W], t[W-1:0]);
      end
      if (!close) begin
        checks++;
        if (dut.a_l !== '0 || dut.b_l !== '0 || dut.cin !== 1'b0) begin
          failures++;
          $display("FAIL closed MSP adder still sees data");
        end
        seen[(int'(a_msp == '1) + int'(b_msp == '1)) * 2 + int'(c_lsp)]++;
      end else n_open++;
      if (prev_close && !close) n_to_closed++;
      if (!prev_close && close) n_to_open++;
      prev_close = close;
    end
    $display("open=%0d open->closed=%0d closed->open=%0d closed classes=%p",
             n_open, n_to_closed, n_to_open, seen);
    checks += 3;
    if (n_open == 0)      failures++;
    if (n_to_closed == 0) failures++;
    if (n_to_open == 0)   failures++;
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
