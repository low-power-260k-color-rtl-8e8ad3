// tb_scan_remover: drives random scan periods (SEN1 low) split by random write pulses and
// checks SEN3 every cycle against a reference that numbers the SEN2 pulses of each scan
// period: a pulse passes only if its number is at most KEEP. Run for two values of KEEP
// (the default 2 and 4). Also checks that the removal flag fires for every removed pulse
// and that periods with one or two pulses lose nothing.
module tb_scan_remover;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sen1_n = 1'b1, wen_n = 1'b1;
  logic sen2_n;
  logic sen3_n_a, mask_a, rem_a;   // KEEP_SCANS = 2
  logic sen3_n_b, mask_b, rem_b;   // KEEP_SCANS = 4
  int   checks = 0, failures = 0;
  int   idx;            // reference pulse number in the current scan period
  logic sen2_prev;
  int   removed_a = 0, kept_a = 0, removed_ref = 0;

  always #5 clk = ~clk;

  sen_mask u_mask (.sen1_n, .wen_n, .sen2_n);
  scan_remover dut_a (.clk, .rst_n, .sen1_n, .sen2_n, .sen3_n(sen3_n_a), .mask_en(mask_a),
                      .scan_removed(rem_a));
  scan_remover #(.KEEP_SCANS(4)) dut_b (.clk, .rst_n, .sen1_n, .sen2_n, .sen3_n(sen3_n_b),
                      .mask_en(mask_b), .scan_removed(rem_b));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: number the SEN2 pulses and compare just before each clock edge.
  always @(posedge clk) begin
    if (rst_n) begin
      logic start;
      int   n;
      start = sen2_prev && !sen2_n && !sen1_n;
      n = start ? idx + 1 : idx;
      checks += 2;
      if (sen3_n_a !== (sen2_n || n > 2 || sen1_n)) begin
        failures++;
        $display("FAIL keep2 t=%0t sen1=%b sen2=%b n=%0d sen3=%b", $time, sen1_n, sen2_n, n, sen3_n_a);
      end
      if (sen3_n_b !== (sen2_n || n > 4 || sen1_n)) begin
        failures++;
        $display("FAIL keep4 t=%0t sen1=%b sen2=%b n=%0d sen3=%b", $time, sen1_n, sen2_n, n, sen3_n_b);
      end
      if (start) begin
        checks++;
        if (rem_a !== (n > 2)) begin
          failures++;
          $display("FAIL removal flag t=%0t n=%0d", $time, n);
        end
        if (n > 2) removed_ref++; else kept_a++;
      end
      if (rem_a) removed_a++;
      idx = sen1_n ? 0 : n;
    end else idx = 0;
    sen2_prev = sen2_n;
  end

  task automatic scan_period(input int writes);
    // SEN1 low for 60 cycles, with `writes` write pulses of 2..4 cycles inside.
    int gap;
    @(negedge clk) sen1_n = 1'b0;
    for (int w = 0; w < writes; w++) begin
      gap = $urandom_range(1, 4);
      repeat (gap) @(negedge clk);
      wen_n = 1'b0;
      repeat ($urandom_range(2, 4)) @(negedge clk);
      wen_n = 1'b1;
    end
    repeat (3) @(negedge clk);
    sen1_n = 1'b1;
    repeat ($urandom_range(2, 6)) @(negedge clk);
    // writes outside the scan period must not disturb anything
    wen_n = 1'b0;
    @(negedge clk) wen_n = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    sen2_prev = 1'b1;
    idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w <= 8; w++) scan_period(w);
    // a write that is already active when SEN1 falls
    @(negedge clk) wen_n = 1'b0;
    @(negedge clk) sen1_n = 1'b0;
    repeat (2) @(negedge clk) wen_n = 1'b1;
    repeat (10) @(negedge clk);
    sen1_n = 1'b1;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 200; k++) scan_period($urandom_range(0, 8));
    @(negedge clk);
    checks++;
    if (removed_a != removed_ref || removed_a == 0 || kept_a == 0) begin
      failures++;
      $display("FAIL: removed %0d (reference %0d), kept %0d", removed_a, removed_ref, kept_a);
    end
    $display("scan pulses kept %0d, removed %0d", kept_a, removed_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
