// tb_scan_count_sweep: the scan-count configurations 7, 4, 3 and 2 (kept scans per scan
// period) side by side, on a reduced panel (16 x 6 pixels, 4 macros, 128 clocks per line).
// As in the measurement setup of the chip, the MPU writes seven pixels in every scan
// period, which splits the scan enable into up to eight pulses. For every line and every
// configuration the number of scans that reached the memory must be
// min(KEEP, SEN2 pulses), the line data at CL must be the image row (the pixels written
// are the ones already stored, so the displayed image stays fixed), and the totals of
// scan word-line cycles must fall as KEEP falls.
module tb_scan_count_sweep;
  localparam int COLS = 16, ROWS = 6, MACROS = 4, LINE_CLKS = 128, PB = 18;
  localparam int NCFG = 4;
  localparam int KEEP [NCFG] = '{7, 4, 3, 2};

  logic clk = 1'b0, resb = 1'b0, disp_on = 1'b0;
  logic csb = 1'b1, wr_n = 1'b1, rd_n = 1'b1, rs = 1'b0;
  logic [17:0] db_in = '0;
  logic [17:0] db_out [NCFG];
  logic db_oe [NCFG];
  logic [COLS*PB-1:0] sdata [NCFG];
  logic cl [NCFG], flm [NCFG], lsync [NCFG], s1 [NCFG], s2 [NCFG], s3 [NCFG], rem [NCFG];
  logic fe [NCFG], sd [NCFG], ga [NCFG];
  logic [ROWS-1:0] gon [NCFG];
  logic [31:0] wlc [NCFG];

  logic [PB-1:0] image [ROWS][COLS];
  int checks = 0, failures = 0;
  int s2_pulses [NCFG], scans [NCFG], total_scans [NCFG], line [NCFG], lines_measured [NCFG];
  logic s2_prev [NCFG];
  bit measuring = 1'b0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    lcd_driver_top #(.COLS(COLS), .ROWS(ROWS), .MACROS(MACROS), .LINE_CLKS(LINE_CLKS),
                     .KEEP_SCANS(KEEP[g])) dut (
      .clk, .resb, .disp_on, .csb, .wr_n, .rd_n, .rs, .db_in, .db_out(db_out[g]), .db_oe(db_oe[g]),
      .source_data(sdata[g]), .cl(cl[g]), .flm(flm[g]), .line_sync_n(lsync[g]), .gate_on(gon[g]),
      .sen1_n(s1[g]), .sen2_n(s2[g]), .sen3_n(s3[g]), .scan_removed(rem[g]), .frame_end(fe[g]),
      .scan_done(sd[g]), .gate_active(ga[g]), .wl_cycles(wlc[g]));

    always @(posedge clk) if (resb) begin
      if (!s1[g] && s2_prev[g] && !s2[g]) s2_pulses[g]++;
      if (sd[g]) scans[g]++;
      s2_prev[g] = s2[g];
      if (cl[g]) begin
        int want;
        logic [COLS*PB-1:0] row_data;
        line[g] = flm[g] ? 0 : line[g] + 1;
        if (measuring) begin
          want = (s2_pulses[g] < KEEP[g]) ? s2_pulses[g] : KEEP[g];
          checks += 2;
          if (scans[g] != want) begin
            failures++;
            $display("FAIL keep=%0d line %0d: %0d scans, %0d SEN2 pulses", KEEP[g], line[g], scans[g], s2_pulses[g]);
          end
          for (int c = 0; c < COLS; c++) row_data[c*PB +: PB] = image[line[g]][c];
          if (sdata[g] !== row_data) begin failures++; $display("FAIL keep=%0d data line %0d", KEEP[g], line[g]); end
          total_scans[g] += scans[g];
          lines_measured[g]++;
        end
        s2_pulses[g] = 0;
        scans[g] = 0;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic r, input logic [17:0] d);
    @(negedge clk);
    csb = 1'b0; rs = r; db_in = d;
    @(negedge clk) wr_n = 1'b0;
    @(negedge clk) wr_n = 1'b1;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int r, c, max_pulses;
    for (int i = 0; i < NCFG; i++) begin
      s2_pulses[i] = 0; scans[i] = 0; lines_measured[i] = 0; total_scans[i] = 0; line[i] = 0; s2_prev[i] = 1'b1;
    end
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) image[y][x] = PB'($urandom);
    repeat (3) @(negedge clk);
    resb = 1'b1;
    // load the image with the display off
    bus_write(1'b0, 18'h0);
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++) bus_write(1'b1, image[y][x]);
    disp_on = 1'b1;
    @(posedge cl[0]);
    measuring = 1'b1;
    // three frames, seven pixel writes in every scan period
    r = 0; c = 0;
    repeat (3 * ROWS) begin
      @(negedge s1[0]);
      bus_write(1'b0, {2'b00, 8'(r), 8'(c)});
      repeat (7) begin
        bus_write(1'b1, image[r][c]);
        c++;
        if (c == COLS) begin c = 0; r = (r + 1) % ROWS; end
      end
    end
    @(posedge cl[0]);
    @(negedge clk);
    measuring = 1'b0;
    for (int i = 0; i < NCFG; i++)
      $display("KEEP_SCANS=%0d: %0d lines, scans %0d, word-line cycles %0d", KEEP[i], lines_measured[i], total_scans[i], wlc[i]);
    checks += NCFG - 1;
    for (int i = 1; i < NCFG; i++)
      if (total_scans[i] >= total_scans[i-1]) begin failures++; $display("FAIL: scans not falling"); end
    checks++;
    if (lines_measured[NCFG-1] < 3 * ROWS - 1 || total_scans[NCFG-1] > 2 * lines_measured[NCFG-1] ||
        total_scans[NCFG-1] < 2 * lines_measured[NCFG-1] - 1) begin failures++; $display("FAIL: expected two scans per line (the first line may have one)"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
