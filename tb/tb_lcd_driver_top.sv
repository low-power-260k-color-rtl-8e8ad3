// tb_lcd_driver_top: end-to-end test of the driver at its default size (176 x 228
// pixels, 18-bit colour, 64 clocks per line, two kept scans per line).
//
// 1. The MPU sets the address to (0,0) and writes a whole random image through the bus,
//    relying on auto increment, while the display keeps scanning: writes split the scan
//    enable into many pulses (masking) and all but the first two are removed.
// 2. With the bus idle, one full frame is displayed: at every CL the source data must be
//    the image row of that line, and after it the gate line of that row must be selected.
// 3. The whole image is written again with the same pixels while the display runs, and
//    every line is checked the same way: scans squeezed between writes must still return
//    the right row.
// 4. Random pixels are read back through the bus.
// Also checked: frame length, and that each mechanism (masked scan, removed scan, a kept
// scan cut too short by a write, address wrap at the end of the memory, bus read, gate
// restart by FLM) occurred.
module tb_lcd_driver_top;
  import lcd_pkg::*;
  localparam int LINE_CLKS = 64;
  localparam int W = COLS * PIX_BITS;

  logic clk = 1'b0, resb = 1'b0, disp_on = 1'b0;
  logic csb = 1'b1, wr_n = 1'b1, rd_n = 1'b1, rs = 1'b0;
  logic [17:0] db_in = '0, db_out;
  logic db_oe;
  logic [W-1:0] source_data;
  logic cl, flm, line_sync_n, sen1_n, sen2_n, sen3_n, scan_removed, frame_end;
  logic scan_done, gate_active;
  logic [ROWS-1:0] gate_on;
  logic [31:0] wl_cycles;

  pixel_t image [ROWS][COLS];
  int checks = 0, failures = 0;
  bit check_lines = 1'b0;
  int line = 0, cl_count = 0, frame_starts = 0, last_frame_end = -1, cyc = 0;
  int masked_periods = 0, removed = 0, reads = 0, wraps = 0, lines_checked = 0;
  int sen2_pulses = 0;
  logic sen2_prev = 1'b1;
  int lost_scans = 0;          // SEN3 pulses cut too short by a write to open the word line
  bit sen3_opened = 1'b0;
  logic sen3_prev = 1'b1;
  int jitter = 0;              // extra idle clocks after each bus write

  always #5 clk = ~clk;

  lcd_driver_top dut (
    .clk, .resb, .disp_on, .csb, .wr_n, .rd_n, .rs, .db_in, .db_out, .db_oe,
    .source_data, .cl, .flm, .line_sync_n, .gate_on, .sen1_n, .sen2_n, .sen3_n,
    .scan_removed, .frame_end, .scan_done, .gate_active, .wl_cycles);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL at %0t: %s", $time, msg);
  endtask

  // Display side monitor: line numbering, source data and gate selection per line.
  always @(posedge clk) if (resb) begin
    cyc++;
    if (!sen1_n && sen2_prev && !sen2_n) sen2_pulses++;
    if (sen1_n && sen2_pulses > 1) masked_periods++;
    if (sen1_n) sen2_pulses = 0;
    sen2_prev = sen2_n;
    if (scan_removed) removed++;
    if (!sen3_n && scan_done) sen3_opened = 1'b1;
    if (sen3_n && !sen3_prev) begin
      if (!sen3_opened) lost_scans++;
      sen3_opened = 1'b0;
    end
    sen3_prev = sen3_n;
    if (frame_end) begin
      if (last_frame_end >= 0) begin
        checks++;
        if (cyc - last_frame_end != ROWS * LINE_CLKS) fail("frame length");
      end
      last_frame_end = cyc;
    end
    if (cl) begin
      line = flm ? 0 : line + 1;
      if (flm) frame_starts++;
      if (check_lines) begin
        logic [W-1:0] want;
        for (int c = 0; c < COLS; c++) want[c*PIX_BITS +: PIX_BITS] = image[line][c];
        checks++;
        lines_checked++;
        if (source_data !== want) fail($sformatf("source data of line %0d", line));
      end
    end
  end

  // gate selection follows CL by one clock
  always @(posedge clk) if (resb && check_lines && $past(cl)) begin
    checks++;
    if (gate_on !== (ROWS'(1) << line)) fail($sformatf("gate select for line %0d", line));
  end

  task automatic bus_write(input logic r, input logic [17:0] d);
    @(negedge clk);
    csb = 1'b0; rs = r; db_in = d;
    repeat (2) @(negedge clk) wr_n = 1'b0;
    wr_n = 1'b1;
    repeat (5 + ((jitter > 0) ? $urandom_range(0, jitter) : 0)) @(negedge clk);
  endtask

  task automatic bus_read(output logic [17:0] d);
    @(negedge clk);
    csb = 1'b0; rs = 1'b1;
    @(negedge clk) rd_n = 1'b0;
    repeat (8) @(negedge clk);
    d = db_out;
    rd_n = 1'b1;
    repeat (3) @(negedge clk);
  endtask

  task automatic write_image();
    bus_write(1'b0, 18'h0_00_00);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) bus_write(1'b1, image[r][c]);
  endtask

  task automatic wait_frames(input int n);
    repeat (n) begin
      @(posedge frame_end);
    end
    @(negedge clk);
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) image[r][c] = PIX_BITS'($urandom);
    repeat (3) @(negedge clk);
    resb = 1'b1;
    disp_on = 1'b1;
    // 1. load the image while scanning
    write_image();
    // one more write lands on (0,0) again only if the address wrapped after the last pixel
    bus_write(1'b1, image[0][0] ^ 18'h1);
    image[0][0] = image[0][0] ^ 18'h1;
    // 2. one clean frame, checked line by line
    wait_frames(1);
    check_lines = 1'b1;
    wait_frames(1);
    // 3. rewrite the same image while checking every line; random spacing of the writes
    //    lets them hit every phase of the scan period
    jitter = 3;
    write_image();
    jitter = 0;
    wait_frames(1);
    check_lines = 1'b0;
    // 4. read back
    for (int i = 0; i < 40; i++) begin
      int r, c;
      logic [17:0] d;
      r = $urandom_range(0, ROWS - 1); c = $urandom_range(0, COLS - 1);
      bus_write(1'b0, {2'b00, 8'(r), 8'(c)});
      bus_read(d);
      reads++;
      checks++;
      if (d !== image[r][c]) fail($sformatf("read (%0d,%0d) %h want %h", r, c, d, image[r][c]));
    end
    // the wrap check: reading (0,0) returns the pixel written after the last one
    begin
      logic [17:0] d;
      bus_write(1'b0, 18'h0);
      bus_read(d);
      checks++;
      if (d === image[0][0]) wraps++;
    end
    // mechanisms that must have happened
    checks += 7;
    if (lost_scans == 0)     fail("no scan pulse was cut short by a write");
    if (masked_periods == 0) fail("no scan period was split by writes");
    if (removed == 0)        fail("no redundant scan was removed");
    if (wraps == 0)          fail("address did not wrap");
    if (reads == 0)          fail("no bus read");
    if (frame_starts < 3)    fail("gate scan never restarted");
    if (lines_checked < 2 * ROWS) fail("too few lines checked");
    $display("lines checked %0d, split scan periods %0d, removed scans %0d, scans cut short %0d, frames %0d, reads %0d, wraps %0d, word-line cycles %0d",
             lines_checked, masked_periods, removed, lost_scans, frame_starts, reads, wraps, wl_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
