// scan_remover: redundant scan signal removal (SEN2 signal counter, SEN1 high edge
// detector and output multiplexer).
//
// While the MPU keeps writing during one scan enable period, the masked scan enable SEN2
// splits into many short scan pulses that all read the same memory row. Only the first
// KEEP_SCANS of them are needed: the first may be cut short by an unsynchronised write, so
// a second one is kept as a margin. This block counts SEN2 pulses and lets through only
// pulses number 1..KEEP_SCANS; later pulses are replaced by a constant high (no scan).
//
// Operation (per clock, all signals active low):
//   * While SEN1 is high (no scan period) the counter is held at 0 (RESETB low).
//   * The first cycle of every SEN2 low pulse increments the counter, which saturates at
//     KEEP_SCANS+1 ("holds at 3" for the default of two kept scans).
//   * MASK ENABLE is high while the count, including the pulse that starts this cycle,
//     lies in 1..KEEP_SCANS; SEN3 = MASK ENABLE ? SEN2 : 1.
// SEN3 follows SEN2 combinationally, so a kept pulse is not delayed or shortened. The
// count values, the saturation at 3 and the multiplexer with a constant-high input follow
// the original chip; the clocked edge detection is this design's choice.
module scan_remover #(
  parameter int unsigned KEEP_SCANS = 2  // scan pulses kept per SEN1 period
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sen1_n,       // original scan enable, active low
  input  logic sen2_n,       // masked scan enable, active low
  output logic sen3_n,       // scan enable after removal, active low
  output logic mask_en,      // high while SEN2 is passed through
  output logic scan_removed  // one-cycle flag: a SEN2 pulse starts and is removed
);
  localparam int unsigned CNT_MAX = KEEP_SCANS + 1;
  localparam int unsigned CNT_W   = $clog2(CNT_MAX + 1);

  logic [CNT_W-1:0] cnt, cnt_eff;
  logic             sen2_q;     // SEN2 of the previous cycle
  logic             pulse_start;

  always_comb begin
    pulse_start = sen2_q && !sen2_n && !sen1_n;
    cnt_eff     = cnt;
    if (pulse_start && cnt != CNT_W'(CNT_MAX)) cnt_eff = cnt + 1'b1;
    mask_en      = !sen1_n && (cnt_eff >= CNT_W'(1)) && (cnt_eff <= CNT_W'(KEEP_SCANS));
    sen3_n       = mask_en ? sen2_n : 1'b1;
    scan_removed = pulse_start && !mask_en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      sen2_q <= 1'b1;
    end else begin
      sen2_q <= sen2_n;
      if (sen1_n) cnt <= '0;   // RESETB: SEN1 high returns the counter to 0
      else        cnt <= cnt_eff;
    end
  end
endmodule
