// tb_addr_gen: address set (with clamping of out-of-range values), auto increment with
// wrap from the last column to the next row and from the last row to row 0, against an
// independent (row, col) model; and the row bus multiplexer between scan and write/read
// address.
module tb_addr_gen;
  localparam int COLS = 5, ROWS = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic addr_load = 1'b0, addr_inc = 1'b0, sen3_n = 1'b1;
  logic [7:0] load_row = '0, load_col = '0;
  logic [1:0] scan_row = '0, wr_row, mem_row;
  logic [2:0] wr_col;
  int checks = 0, failures = 0, mr = 0, mc = 0, wraps = 0;

  always #5 clk = ~clk;

  addr_gen #(.COLS(COLS), .ROWS(ROWS)) dut (
    .clk, .rst_n, .addr_load, .load_row, .load_col, .addr_inc, .scan_row, .sen3_n,
    .wr_row, .wr_col, .mem_row);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks += 3;
    if (wr_row != 2'(mr) || wr_col != 3'(mc)) begin
      failures++; $display("FAIL addr (%0d,%0d) want (%0d,%0d)", wr_row, wr_col, mr, mc);
    end
    if (mem_row != (sen3_n ? wr_row : scan_row)) begin failures++; $display("FAIL mux"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int k;
      k = $urandom_range(0, 9);
      addr_load = (k == 0);
      addr_inc  = (k >= 3);
      load_row  = 8'($urandom_range(0, 4));
      load_col  = 8'($urandom_range(0, 7));
      scan_row  = 2'($urandom_range(0, ROWS - 1));
      sen3_n    = $urandom_range(0, 1) != 0;
      #1 checks++;
      if (mem_row != (sen3_n ? wr_row : scan_row)) begin failures++; $display("FAIL mux"); end
      @(negedge clk);
      if (addr_load) begin
        mr = (load_row < ROWS) ? load_row : ROWS - 1;
        mc = (load_col < COLS) ? load_col : COLS - 1;
      end else if (addr_inc) begin
        mc++;
        if (mc == COLS) begin
          mc = 0; mr++;
          if (mr == ROWS) begin mr = 0; wraps++; end
        end
      end
      compare();
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: no full wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
