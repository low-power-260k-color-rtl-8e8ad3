// gram: the embedded graphic memory of the source driver.
//
// COLS x ROWS pixels of PIX_BITS bits (176 x 228 x 18 = 722,304 bits by default) are held
// in MACROS macro-blocks (16), each a vertical slice of COLS/MACROS pixel columns. One
// row address bus carries either the write/read address or the scan address, whichever
// operation the enables request. A write or read selects the one macro that holds the
// addressed pixel; a scan reads the same row from all macros into their scan latches, so
// sdata holds the whole display line: pixel c at sdata[c*PIX_BITS +: PIX_BITS].
//
// gram_ctrl re-times every access (precharge, shortened word line, sense amplifier).
// Timing: rdata is valid the cycle after the first open word-line cycle of a read and
// stays until the next read; sdata changes the cycle after a scan's word line opens.
// scan_done pulses in each cycle a scan word line is open; wl itself is internal. The split into 16 macros with
// select, the shared bit lines of scan and write, and the regenerated timing follow the
// original chip; address bus widths and pixel-wide access are this design's choice.
module gram #(
  parameter int unsigned COLS       = 176,
  parameter int unsigned ROWS       = 228,
  parameter int unsigned PIX_BITS   = 18,
  parameter int unsigned MACROS     = 16,
  parameter bit          REGEN      = 1'b1,
  parameter int unsigned PRE_CYCLES = 1,
  parameter int unsigned WL_CYCLES  = 1,
  localparam int unsigned ROW_W     = $clog2(ROWS),
  localparam int unsigned COL_W     = $clog2(COLS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wen_n,   // write enable, active low
  input  logic                     ren_n,   // read enable, active low
  input  logic                     sen_n,   // scan enable, active low
  input  logic [ROW_W-1:0]         row,     // write/read or scan row address
  input  logic [COL_W-1:0]         col,     // write/read column address
  input  logic [PIX_BITS-1:0]      wdata,
  output logic [PIX_BITS-1:0]      rdata,
  output logic [COLS*PIX_BITS-1:0] sdata,   // scan output bus to the source drivers
  output logic                     scan_done,
  output logic                     pre_n,   // precharge enable, active low
  output logic                     sae_n,   // sense amplifier enable, active low
  output logic [31:0]              wl_cycles
);
  localparam int unsigned WORDS  = COLS / MACROS;
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned MSEL_W = (MACROS > 1) ? $clog2(MACROS) : 1;

  logic wl_write, wl_read, wl_scan;

  gram_ctrl #(.REGEN(REGEN), .PRE_CYCLES(PRE_CYCLES), .WL_CYCLES(WL_CYCLES)) u_ctrl (
    .clk, .rst_n, .wen_n, .ren_n, .sen_n,
    .pre_n, .wl(), .sae_n, .wl_write, .wl_read, .wl_scan, .wl_cycles
  );

  // Macro select decoding (MUXUL/MUXU decoders): column -> macro and word in macro.
  logic [MSEL_W-1:0] msel, msel_rd;
  logic [WSEL_W-1:0] word;
  always_comb begin
    msel = MSEL_W'(col / COL_W'(WORDS));
    word = WSEL_W'(col % COL_W'(WORDS));
  end

  logic [PIX_BITS-1:0] mrdata [MACROS];

  for (genvar m = 0; m < MACROS; m++) begin : g_macro
    gram_macro #(.ROWS(ROWS), .WORDS(WORDS), .PIX_BITS(PIX_BITS)) u_macro (
      .clk, .rst_n,
      .sel   (msel == MSEL_W'(m)),
      .wr    (wl_write),
      .rd    (wl_read),
      .scan  (wl_scan),
      .row, .word, .wdata,
      .rdata (mrdata[m]),
      .sdout (sdata[m*WORDS*PIX_BITS +: WORDS*PIX_BITS])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       msel_rd <= '0;
    else if (wl_read) msel_rd <= msel;
  end

  always_comb begin
    rdata     = mrdata[msel_rd];
    scan_done = wl_scan;
  end

  initial begin
    assert (COLS % MACROS == 0) else $error("COLS must be a multiple of MACROS");
  end
endmodule
