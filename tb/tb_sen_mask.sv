// tb_sen_mask: exhaustive check of the scan-enable masking circuit. For every input
// combination, repeated in random order, SEN2 must be active (low) exactly when SEN1 is
// active and no write/read is in progress.
module tb_sen_mask;
  logic clk = 1'b0;
  logic sen1_n, wen_n, sen2_n;
  int   checks = 0, failures = 0;

  sen_mask dut (.sen1_n, .wen_n, .sen2_n);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic scan_req, write_busy, expect_scan;
      @(negedge clk);
      {scan_req, write_busy} = (i < 4) ? 2'(i) : 2'($urandom_range(0, 3));
      sen1_n = !scan_req;
      wen_n  = !write_busy;
      #1;
      expect_scan = scan_req && !write_busy;
      checks++;
      if (sen2_n !== !expect_scan) begin
        failures++;
        $display("FAIL: sen1_n=%b wen_n=%b sen2_n=%b", sen1_n, wen_n, sen2_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
