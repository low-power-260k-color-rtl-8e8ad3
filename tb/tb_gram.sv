// tb_gram: the full-size graphic memory (176 x 228 pixels, 16 macros). Random pixel
// writes, reads and row scans issued as active-low enables of random length are checked
// against a pixel-array model: read data one cycle after the word line opened, the whole
// scanned row on the scan bus, and no effect from an enable too short for the word line
// to open (a one-cycle pulse with the default one settle cycle).
module tb_gram;
  import lcd_pkg::*;
  localparam int RW = $clog2(ROWS), CW = $clog2(COLS);
  logic clk = 1'b0, rst_n = 1'b0;
  logic wen_n = 1'b1, ren_n = 1'b1, sen_n = 1'b1;
  logic [RW-1:0] row = '0;
  logic [CW-1:0] col = '0;
  pixel_t wdata = '0, rdata;
  logic [COLS*PIX_BITS-1:0] sdata, exp_s;
  logic scan_done, pre_n, sae_n;
  logic [31:0] wl_cycles;
  pixel_t model [ROWS][COLS];
  int checks = 0, failures = 0, scans = 0, short_pulses = 0;

  always #5 clk = ~clk;

  gram dut (.clk, .rst_n, .wen_n, .ren_n, .sen_n, .row, .col, .wdata, .rdata, .sdata,
            .scan_done, .pre_n, .sae_n, .wl_cycles);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input int kind, input int len);
    @(negedge clk);
    case (kind)
      0: wen_n = 1'b0;
      1: ren_n = 1'b0;
      default: sen_n = 1'b0;
    endcase
    repeat (len) @(negedge clk);
    wen_n = 1'b1; ren_n = 1'b1; sen_n = 1'b1;
  endtask

  task automatic write_px(input int r, input int c, input pixel_t d);
    row = RW'(r); col = CW'(c); wdata = d;
    pulse(0, $urandom_range(2, 4));
    model[r][c] = d;
  endtask

  task automatic read_px(input int r, input int c);
    row = RW'(r); col = CW'(c);
    pulse(1, 2);   // word line opens in the 2nd cycle; data registered at its end
    checks++;
    if (rdata !== model[r][c]) begin
      failures++;
      $display("FAIL read (%0d,%0d) %h want %h", r, c, rdata, model[r][c]);
    end
  endtask

  task automatic scan_row(input int r, input int len);
    logic [COLS*PIX_BITS-1:0] latch_prev;
    latch_prev = sdata;
    row = RW'(r);
    pulse(2, len);
    for (int c = 0; c < COLS; c++) exp_s[c*PIX_BITS +: PIX_BITS] = model[r][c];
    checks++;
    if (len < 2) begin
      short_pulses++;
      if (sdata !== latch_prev) begin failures++; $display("FAIL: short scan changed latch"); end
    end else begin
      scans++;
      if (sdata !== exp_s) begin failures++; $display("FAIL scan row %0d", r); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) model[r][c] = '0;
    // Fill every row once (one pixel per column of a few rows fully).
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        row = RW'(r); col = CW'(c); wdata = PIX_BITS'($urandom);
        pulse(0, 2);
        model[r][c] = wdata;
      end
    for (int r = 0; r < ROWS; r++) scan_row(r, 2);
    for (int i = 0; i < 4000; i++) begin
      int k;
      k = $urandom_range(0, 9);
      if (k < 5)      write_px($urandom_range(0, ROWS - 1), $urandom_range(0, COLS - 1), PIX_BITS'($urandom));
      else if (k < 8) read_px($urandom_range(0, ROWS - 1), $urandom_range(0, COLS - 1));
      else            scan_row($urandom_range(0, ROWS - 1), $urandom_range(1, 3));
    end
    @(negedge clk);
    checks++;
    if (scans == 0 || short_pulses == 0) begin failures++; $display("FAIL: coverage"); end
    $display("scans %0d, short scan pulses %0d, word-line cycles %0d", scans, short_pulses, wl_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
