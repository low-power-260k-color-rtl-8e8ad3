// addr_gen: memory address generator.
//
// Keeps the write/read address (row = gate line, col = pixel) for the MPU side. An
// address-set command loads it; after every pixel write or read it advances to the next
// pixel, wrapping from the last column to column 0 of the next row and from the last row
// back to row 0. The scan address comes from the timing controller and is generated
// independently. Both share one row address bus into the memory: while the scan enable
// that reaches the memory (SEN3) is active the bus carries the scan address, otherwise
// the write/read address, so each address is applied only during its own operation.
//
// Timing: the write/read address updates at the clock edge after addr_load or addr_inc;
// the row bus multiplexer is combinational. Independent write and scan addresses on a
// shared bus follow the original chip; the increment order is this design's choice.
module addr_gen #(
  parameter int unsigned COLS = 176,
  parameter int unsigned ROWS = 228,
  localparam int unsigned ROW_W = $clog2(ROWS),
  localparam int unsigned COL_W = $clog2(COLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             addr_load,
  input  logic [7:0]       load_row,
  input  logic [7:0]       load_col,
  input  logic             addr_inc,
  input  logic [ROW_W-1:0] scan_row,  // scan address from the timing controller
  input  logic             sen3_n,    // scan enable at the memory, active low
  output logic [ROW_W-1:0] wr_row,    // write/read address
  output logic [COL_W-1:0] wr_col,
  output logic [ROW_W-1:0] mem_row    // row address bus into the memory
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row <= '0;
      wr_col <= '0;
    end else if (addr_load) begin
      // Out-of-range values are clamped to the last row/column.
      wr_row <= (32'(load_row) < ROWS) ? ROW_W'(load_row) : ROW_W'(ROWS - 1);
      wr_col <= (32'(load_col) < COLS) ? COL_W'(load_col) : COL_W'(COLS - 1);
    end else if (addr_inc) begin
      if (wr_col == COL_W'(COLS - 1)) begin
        wr_col <= '0;
        wr_row <= (wr_row == ROW_W'(ROWS - 1)) ? '0 : wr_row + 1'b1;
      end else begin
        wr_col <= wr_col + 1'b1;
      end
    end
  end

  always_comb mem_row = !sen3_n ? scan_row : wr_row;
endmodule
