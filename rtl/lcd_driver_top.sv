// lcd_driver_top: logic of the two-chip 260k-colour TFT LCD driver.
//
// Source IC: the MPU interface decodes bus cycles; the memory address generator turns
// them into write/read addresses; the timing controller produces the line timing, the
// scan enable SEN1 and the scan address. Because the 6-transistor graphic memory scans
// over the same bit lines that writes use, SEN1 is first masked by the write/read enable
// (SEN2) and then thinned by the redundant scan remover (SEN3), which passes only the
// first KEEP_SCANS scan pulses of each line: all later pulses would read the same row
// again and only cost power. The graphic memory (16 macro-blocks, 722,304 bits) scans the
// addressed row into its scan latches, whose contents (source_data) feed the source
// drivers. Gate IC: the gate driver counter receives CL and FLM and selects the gate
// lines in turn.
//
// Not part of this logic and brought out as ports instead: the source driver DACs and
// gray scale generator (source_data), the gate high-voltage outputs (gate_on), the
// oscillator (clk), DC-DC converter and voltage generators.
//
// One clock (the oscillator) drives everything; MPU strobes are synchronised inside
// mpu_if. The block structure and the masking/removal chain follow the original chip; the
// single clock domain is this design's choice.
module lcd_driver_top #(
  parameter int unsigned COLS       = lcd_pkg::COLS,
  parameter int unsigned ROWS       = lcd_pkg::ROWS,
  parameter int unsigned MACROS     = lcd_pkg::MACROS,
  parameter int unsigned LINE_CLKS  = 64,
  parameter int unsigned KEEP_SCANS = 2,
  parameter bit          REGEN      = 1'b1,
  localparam int unsigned ROW_W     = $clog2(ROWS)
) (
  input  logic                     clk,          // oscillator clock
  input  logic                     resb,         // reset, active low
  input  logic                     disp_on,
  // MPU bus
  input  logic                     csb,
  input  logic                     wr_n,
  input  logic                     rd_n,
  input  logic                     rs,
  input  logic [17:0]              db_in,
  output logic [17:0]              db_out,
  output logic                     db_oe,
  // to the source drivers
  output logic [COLS*lcd_pkg::PIX_BITS-1:0] source_data,
  // gate control signals and gate IC outputs
  output logic                     cl,
  output logic                     flm,
  output logic                     line_sync_n,
  output logic [ROWS-1:0]          gate_on,
  // observation of the scan masking chain
  output logic                     sen1_n,
  output logic                     sen2_n,
  output logic                     sen3_n,
  output logic                     scan_removed,
  output logic                     frame_end,
  output logic                     scan_done,    // a scan word line is open
  output logic                     gate_active,
  output logic [31:0]              wl_cycles
);
  localparam int unsigned COL_W = $clog2(COLS);

  logic                wen_n, ren_n, addr_load, addr_inc;
  logic [17:0]         wdata, mem_rdata;
  logic [7:0]          load_row, load_col;
  logic [ROW_W-1:0]    scan_row, mem_row;
  logic [COL_W-1:0]    wr_col;
  logic                acc_n;

  mpu_if u_mpu (
    .clk, .rst_n(resb), .csb, .wr_n, .rd_n, .rs, .db_in, .db_out, .db_oe,
    .mem_rdata, .wen_n, .ren_n, .wdata, .addr_load, .load_row, .load_col, .addr_inc
  );

  timing_ctrl #(.ROWS(ROWS), .LINE_CLKS(LINE_CLKS)) u_timing (
    .clk, .rst_n(resb), .disp_on, .line_sync_n, .sen1_n, .scan_row, .cl, .flm, .frame_end
  );

  // Both writes and reads occupy the bit lines, so both mask the scan.
  always_comb acc_n = wen_n & ren_n;

  sen_mask u_mask (.sen1_n, .wen_n(acc_n), .sen2_n);

  scan_remover #(.KEEP_SCANS(KEEP_SCANS)) u_remove (
    .clk, .rst_n(resb), .sen1_n, .sen2_n, .sen3_n, .mask_en(), .scan_removed
  );

  addr_gen #(.COLS(COLS), .ROWS(ROWS)) u_addr (
    .clk, .rst_n(resb), .addr_load, .load_row, .load_col, .addr_inc,
    .scan_row, .sen3_n, .wr_row(), .wr_col, .mem_row
  );

  gram #(.COLS(COLS), .ROWS(ROWS), .PIX_BITS(lcd_pkg::PIX_BITS), .MACROS(MACROS), .REGEN(REGEN)) u_gram (
    .clk, .rst_n(resb), .wen_n, .ren_n, .sen_n(sen3_n), .row(mem_row), .col(wr_col),
    .wdata, .rdata(mem_rdata), .sdata(source_data), .scan_done, .pre_n(), .sae_n(), .wl_cycles
  );

  gate_counter #(.ROWS(ROWS)) u_gate (
    .clk, .rst_n(resb), .cl, .flm, .gate_on, .line(), .active(gate_active)
  );
endmodule
