// tb_gram_ctrl: checks the regenerated SRAM access timing. Each access applies one
// enable for a random length; the reference expects precharge off for the whole enable,
// the word line open exactly in cycles PRE..PRE+WL-1 after the enable fell (shortened
// mode) or from cycle PRE to the end of the enable (conventional mode), the sense
// amplifier only for reads and scans, and the word-line cycle counters to agree.
module tb_gram_ctrl;
  localparam int PRE = 2, WL = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wen_n = 1'b1, ren_n = 1'b1, sen_n = 1'b1;
  logic pre_n_a, wl_a, sae_n_a, ww_a, wr_a, ws_a;
  logic pre_n_b, wl_b, sae_n_b, ww_b, wr_b, ws_b;
  logic [31:0] cyc_a, cyc_b;
  int checks = 0, failures = 0;
  int t;              // cycles since the current enable fell, -1 when idle
  int op;             // 0 write, 1 read, 2 scan
  int exp_a = 0, exp_b = 0;

  always #5 clk = ~clk;

  gram_ctrl #(.REGEN(1'b1), .PRE_CYCLES(PRE), .WL_CYCLES(WL)) dut_a (
    .clk, .rst_n, .wen_n, .ren_n, .sen_n, .pre_n(pre_n_a), .wl(wl_a), .sae_n(sae_n_a),
    .wl_write(ww_a), .wl_read(wr_a), .wl_scan(ws_a), .wl_cycles(cyc_a));
  gram_ctrl #(.REGEN(1'b0), .PRE_CYCLES(PRE), .WL_CYCLES(WL)) dut_b (
    .clk, .rst_n, .wen_n, .ren_n, .sen_n, .pre_n(pre_n_b), .wl(wl_b), .sae_n(sae_n_b),
    .wl_write(ww_b), .wl_read(wr_b), .wl_scan(ws_b), .wl_cycles(cyc_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s t=%0d op=%0d got %b want %b at %0t", what, t, op, got, want, $time);
    end
  endtask

  // Compare just before each rising edge.
  always @(posedge clk) if (rst_n) begin
    logic active, want_a, want_b;
    active = (t >= 0);
    want_a = active && t >= PRE && t < PRE + WL;
    want_b = active && t >= PRE;
    check("pre_n", pre_n_a, active);
    check("wl shortened", wl_a, want_a);
    check("wl conventional", wl_b, want_b);
    check("write", ww_a, want_a && op == 0);
    check("read", wr_a, want_a && op == 1);
    check("scan", ws_a, want_a && op == 2);
    check("sae_n", sae_n_a, !(want_a && op != 0));
    check("sae_n conv", sae_n_b, !(want_b && op != 0));
    if (want_a) exp_a++;
    if (want_b) exp_b++;
  end

  // The enable of the previous access is released at the start of the next one, so
  // with gap 0 two accesses follow each other without an idle cycle.
  task automatic access(input int kind, input int len, input int gap);
    repeat (gap) begin
      wen_n = 1'b1; ren_n = 1'b1; sen_n = 1'b1;
      t = -1;
      @(negedge clk);
    end
    wen_n = 1'b1; ren_n = 1'b1; sen_n = 1'b1;
    op = kind;
    t  = 0;
    case (kind)
      0: wen_n = 1'b0;
      1: ren_n = 1'b0;
      default: sen_n = 1'b0;
    endcase
    repeat (len) @(negedge clk) t++;
  endtask

  initial begin
    t = -1; op = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int len = 1; len <= 10; len++)
      for (int k = 0; k < 3; k++) access(k, len, 1);
    // back-to-back changes of operation, as the scan masking produces them
    for (int i = 0; i < 500; i++) begin
      int k, prev;
      prev = op;
      k = (prev + $urandom_range(1, 2)) % 3;
      access(k, $urandom_range(1, 12), $urandom_range(0, 1) ? 0 : $urandom_range(1, 3));
    end
    access(0, 1, 2);
    wen_n = 1'b1; t = -1;
    @(negedge clk);
    checks += 2;
    if (cyc_a != 32'(exp_a)) begin failures++; $display("FAIL count %0d/%0d", cyc_a, exp_a); end
    if (cyc_b != 32'(exp_b)) begin failures++; $display("FAIL count conv %0d/%0d", cyc_b, exp_b); end
    $display("word-line cycles: shortened %0d, conventional %0d", cyc_a, cyc_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
