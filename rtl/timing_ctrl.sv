// timing_ctrl: display timing controller of the source driver.
//
// Driven by the internal oscillator clock, it divides time into display lines of
// LINE_CLKS clocks and frames of ROWS lines. In every line the panel line synchronising
// signal line_sync_n is low for the first SCAN_CLKS clocks; the scan enable SEN1 is low
// over the same interval, and the scan address is the current line, so each line's memory
// row is scanned once per frame. For the gate IC it produces CL, a one-clock pulse when
// the scan interval of a line ends (the line's data is then in the scan latch), and FLM,
// high throughout line 0 so that the CL of line 0 restarts the gate scan. disp_on = 0
// stops the scan and the line clock.
//
// The frame rate is f_osc / (ROWS * LINE_CLKS). Scan enable following the line sync
// signal, one row per line, and the CL/FLM pin names follow the original chip; LINE_CLKS,
// SCAN_CLKS and the CL/FLM timing are this design's choice.
module timing_ctrl #(
  parameter int unsigned ROWS      = 228,
  parameter int unsigned LINE_CLKS = 64,
  parameter int unsigned SCAN_CLKS = LINE_CLKS / 2,
  localparam int unsigned ROW_W    = $clog2(ROWS),
  localparam int unsigned LC_W     = $clog2(LINE_CLKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             disp_on,
  output logic             line_sync_n,  // panel 1-line synchronising signal
  output logic             sen1_n,       // scan enable, active low
  output logic [ROW_W-1:0] scan_row,     // scan address
  output logic             cl,           // line clock to the gate IC
  output logic             flm,          // first-line marker to the gate IC
  output logic             frame_end     // one-clock pulse at the last clock of a frame
);
  logic [LC_W-1:0] pos;   // clock within the line

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= '0;
      scan_row <= '0;
    end else if (!disp_on) begin
      pos      <= '0;
      scan_row <= '0;
    end else if (pos == LC_W'(LINE_CLKS - 1)) begin
      pos      <= '0;
      scan_row <= (scan_row == ROW_W'(ROWS - 1)) ? '0 : scan_row + 1'b1;
    end else begin
      pos <= pos + 1'b1;
    end
  end

  always_comb begin
    line_sync_n = !(disp_on && pos < LC_W'(SCAN_CLKS));
    sen1_n      = line_sync_n;
    cl          = disp_on && (pos == LC_W'(SCAN_CLKS));
    flm         = disp_on && (scan_row == '0);
    frame_end   = disp_on && (pos == LC_W'(LINE_CLKS - 1)) && (scan_row == ROW_W'(ROWS - 1));
  end

  initial begin
    assert (SCAN_CLKS > 0 && SCAN_CLKS < LINE_CLKS) else $error("need 0 < SCAN_CLKS < LINE_CLKS");
  end
endmodule
