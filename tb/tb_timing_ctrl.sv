// tb_timing_ctrl: runs several frames of a small panel and checks, clock by clock,
// line sync / SEN1 low for the first SCAN_CLKS clocks of each line, the scan address
// stepping one row per line, CL one clock after the scan interval ends, FLM during line
// 0, the frame length ROWS x LINE_CLKS, and that display off stops everything.
module tb_timing_ctrl;
  localparam int ROWS = 5, LC = 10, SC = 4;
  logic clk = 1'b0, rst_n = 1'b0, disp_on = 1'b0;
  logic line_sync_n, sen1_n, cl, flm, frame_end;
  logic [2:0] scan_row;
  int checks = 0, failures = 0, n = 0, frames = 0, last_end = -1;

  always #5 clk = ~clk;

  timing_ctrl #(.ROWS(ROWS), .LINE_CLKS(LC), .SCAN_CLKS(SC)) dut (
    .clk, .rst_n, .disp_on, .line_sync_n, .sen1_n, .scan_row, .cl, .flm, .frame_end);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s n=%0d: %0d want %0d", what, n, got, want); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check("sen1 off", int'(sen1_n), 1);
    check("cl off", int'(cl), 0);
    disp_on = 1'b1;
    for (n = 0; n < 4 * ROWS * LC; n++) begin
      int pos, line;
      #1;
      pos = n % LC; line = (n / LC) % ROWS;
      check("sen1_n", int'(sen1_n), (pos < SC) ? 0 : 1);
      check("line_sync_n", int'(line_sync_n), (pos < SC) ? 0 : 1);
      check("scan_row", int'(scan_row), line);
      check("cl", int'(cl), (pos == SC) ? 1 : 0);
      check("flm", int'(flm), (line == 0) ? 1 : 0);
      if (frame_end) begin
        if (last_end >= 0) check("frame length", n - last_end, ROWS * LC);
        last_end = n;
        frames++;
      end
      @(negedge clk);
    end
    check("frames", frames, 4);
    disp_on = 1'b0;
    repeat (2) @(negedge clk);
    check("off sen1", int'(sen1_n), 1);
    check("off row", int'(scan_row), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
