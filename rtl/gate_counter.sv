// gate_counter: the gate driver counter of the gate IC.
//
// Selects the panel's gate lines one at a time, in order, so that the source drivers'
// voltages reach one row of pixels at a time. A CL pulse with FLM high restarts the scan
// at gate line 0; every other CL pulse moves the selection to the next line; after the
// last line no line is selected until the next FLM. gate_on is one-hot (or zero) and is
// the logic-level input of the high-voltage gate output stage (VGH/VGOF), which is not
// part of this logic.
//
// Timing: the selection changes at the clock edge that samples CL. Sequential selection
// by a counter driven by the source IC's control signals follows the original chip; the CL/FLM
// protocol is this design's choice.
module gate_counter #(
  parameter int unsigned ROWS = 228,
  localparam int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cl,
  input  logic             flm,
  output logic [ROWS-1:0]  gate_on,
  output logic [ROW_W-1:0] line,
  output logic             active
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line   <= '0;
      active <= 1'b0;
    end else if (cl) begin
      if (flm) begin
        line   <= '0;
        active <= 1'b1;
      end else if (line == ROW_W'(ROWS - 1)) begin
        active <= 1'b0;
      end else begin
        line <= line + 1'b1;
      end
    end
  end

  always_comb begin
    gate_on = '0;
    if (active) gate_on[line] = 1'b1;
  end
endmodule
