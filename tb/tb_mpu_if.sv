// tb_mpu_if: drives MPU bus cycles (address set, pixel writes, pixel reads, cycles with
// CSB high) and checks the decoded outputs: the loaded row/column, the pixel and the
// width of the write enable (WR_PULSE cycles), the read enable width, the data returned on
// DB from a memory model, one address increment per pixel access and none otherwise.
module tb_mpu_if;
  localparam int WP = 2, RP = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic csb = 1'b1, wr_n = 1'b1, rd_n = 1'b1, rs = 1'b0;
  logic [17:0] db_in = '0, db_out, mem_rdata, wdata;
  logic db_oe, wen_n, ren_n, addr_load, addr_inc;
  logic [7:0] load_row, load_col;
  int checks = 0, failures = 0;
  int loads = 0, incs = 0, wen_cycles = 0, ren_cycles = 0;
  logic [17:0] last_wdata;

  always #5 clk = ~clk;

  mpu_if #(.WR_PULSE(WP), .RD_PULSE(RP)) dut (
    .clk, .rst_n, .csb, .wr_n, .rd_n, .rs, .db_in, .db_out, .db_oe, .mem_rdata,
    .wen_n, .ren_n, .wdata, .addr_load, .load_row, .load_col, .addr_inc);

  // memory model: read data is a function of the (fixed) test address
  assign mem_rdata = 18'h2A5C3;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (addr_load) loads++;
    if (addr_inc)  incs++;
    if (!wen_n) begin wen_cycles++; last_wdata = wdata; end
    if (!ren_n) ren_cycles++;
    checks++;
    if (!wen_n && !ren_n) begin failures++; $display("FAIL: write and read together"); end
  end

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d want %0d", what, got, want); end
  endtask

  task automatic bus_write(input logic sel, input logic r, input logic [17:0] d);
    @(negedge clk);
    csb = sel; rs = r; db_in = d;
    repeat (2) @(negedge clk);
    wr_n = 1'b0;
    repeat (3) @(negedge clk);
    wr_n = 1'b1;
    @(negedge clk);
    db_in = 18'($urandom);
    repeat (WP + 5) @(negedge clk);
    csb = 1'b1;
  endtask

  task automatic bus_read(output logic [17:0] d, output logic oe);
    @(negedge clk);
    csb = 1'b0; rs = 1'b1;
    @(negedge clk) rd_n = 1'b0;
    repeat (RP + 6) @(negedge clk);
    d = db_out; oe = db_oe;
    rd_n = 1'b1;
    repeat (3) @(negedge clk);
    csb = 1'b1;
  endtask

  initial begin
    logic [17:0] d;
    logic oe;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // address set
    bus_write(1'b0, 1'b0, 18'h0_A7_2B);
    check("loads", loads, 1); check("row", load_row, 8'hA7); check("col", load_col, 8'h2B);
    check("incs after address set", incs, 0);
    // pixel writes
    for (int i = 1; i <= 20; i++) begin
      logic [17:0] px;
      px = 18'($urandom);
      bus_write(1'b0, 1'b1, px);
      check("pixel", int'(last_wdata), int'(px));
      check("wen cycles", wen_cycles, i * WP);
      check("incs", incs, i);
    end
    // deselected cycles do nothing
    bus_write(1'b1, 1'b1, 18'h3FFFF);
    bus_write(1'b1, 1'b0, 18'h01234);
    check("wen cycles deselected", wen_cycles, 20 * WP);
    check("loads deselected", loads, 1);
    // reads
    for (int i = 1; i <= 5; i++) begin
      bus_read(d, oe);
      check("read data", int'(d), int'(mem_rdata));
      check("db_oe", int'(oe), 1);
      check("ren cycles", ren_cycles, i * RP);
      check("incs after read", incs, 20 + i);
    end
    @(negedge clk);
    check("db_oe idle", int'(db_oe), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
