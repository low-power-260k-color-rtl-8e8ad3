// gram_macro: one macro-block of the embedded graphic memory.
//
// The bit core is ROWS word lines of WORDS pixels each. A write or read touches one pixel
// of the selected row through the I/O block; a scan reads the whole row at once into the
// macro's scan latch, whose contents drive the source drivers until the next scan. Only a
// selected macro takes part in a write or read, which saves access power; a scan acts on
// every macro. The timing strobes (wr, rd, scan) come from gram_ctrl and are high in each
// cycle the word line is open.
//
// Timing: write takes effect at the clock edge; rdata and sdout are registered and valid
// the cycle after the strobe. The organisation into macro-blocks with select and a scan
// latch follows the original chip; the word size of one access (a pixel) is this design's
// choice.
module gram_macro #(
  parameter int unsigned ROWS     = 228,  // word lines (gate lines)
  parameter int unsigned WORDS    = 11,   // pixels per row in this macro
  parameter int unsigned PIX_BITS = 18,   // bits per pixel
  localparam int unsigned ROW_W   = $clog2(ROWS),
  localparam int unsigned WSEL_W  = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sel,     // macro select for write/read
  input  logic                      wr,      // word line open, write
  input  logic                      rd,      // word line open, read
  input  logic                      scan,    // word line open, scan
  input  logic [ROW_W-1:0]          row,     // X (word-line) address
  input  logic [WSEL_W-1:0]         word,    // pixel within the row (I/O select)
  input  logic [PIX_BITS-1:0]       wdata,
  output logic [PIX_BITS-1:0]       rdata,
  output logic [WORDS*PIX_BITS-1:0] sdout    // scan latch
);
  logic [WORDS*PIX_BITS-1:0] core [ROWS];

  always_ff @(posedge clk) begin
    if (sel && wr) core[row][word*PIX_BITS +: PIX_BITS] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
      sdout <= '0;
    end else begin
      if (sel && rd) rdata <= core[row][word*PIX_BITS +: PIX_BITS];
      if (scan)      sdout <= core[row];
    end
  end
endmodule
