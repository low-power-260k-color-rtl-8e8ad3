// gram_ctrl: control block of the embedded graphic SRAM, regenerating the internal
// access timing from the external enables.
//
// The write, read and scan enables arrive over long metal lines with slow edges and a
// generous timing margin. The control block does not use them directly: it re-times every
// access locally. When an enable goes low the precharge is switched off (pre_n goes high
// in the same cycle), the bit/bitb lines are given PRE_CYCLES clock cycles to settle (the
// role of the bit-line stable detector; modelled here as a fixed count), and then the word
// line is opened for only WL_CYCLES cycles, with the sense amplifier enabled (sae_n low)
// for reads and scans. With REGEN = 0 the word line instead stays open until the external
// enable ends, as in the conventional scheme; this is kept for comparison only.
//
// An access whose external enable ends before the word line has opened does not happen:
// this is how a scan pulse cut short by a write is lost. A change from one enable to
// another without an idle cycle in between (the masking makes a scan start in the cycle a
// write ends) starts a new sequence.
//
// Interface: all enables active low and at most one low at a time (asserted). wl_write,
// wl_read and wl_scan tell the array which operation the open word line performs; the
// array acts in every cycle its word line is open. wl_cycles counts open word-line cycles,
// the quantity the shortened word-line select minimises. The shortened pulse, the
// precharge/sense-amplifier sequence and the stable-time detection follow the original chip;
// the cycle counts are this design's choice.
module gram_ctrl #(
  parameter bit          REGEN      = 1'b1,  // 1: shortened word line, 0: follows enable
  parameter int unsigned PRE_CYCLES = 1,     // bit-line settle cycles before word line
  parameter int unsigned WL_CYCLES  = 1      // word-line open cycles when REGEN = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wen_n,     // external write enable
  input  logic        ren_n,     // external read enable
  input  logic        sen_n,     // external scan enable
  output logic        pre_n,     // precharge enable, active low (low = precharging)
  output logic        wl,        // word-line select, active high
  output logic        sae_n,     // sense amplifier enable, active low
  output logic        wl_write,  // word line open for a write
  output logic        wl_read,   // word line open for a read
  output logic        wl_scan,   // word line open for a scan
  output logic [31:0] wl_cycles  // total cycles with an open word line
);
  localparam int unsigned CNT_MAX = PRE_CYCLES + WL_CYCLES;
  localparam int unsigned CNT_W   = $clog2(CNT_MAX + 1);

  logic             act;
  logic [2:0]       ops, ops_q;      // requested operation, this and last cycle
  logic [CNT_W-1:0] cnt, cnt_eff;    // cycles since the operation began, saturating

  always_comb begin
    ops     = {!wen_n, !ren_n, !sen_n};
    act     = |ops;
    // A new operation restarts the sequence, also when it follows the previous one
    // without an idle cycle (a scan pulse that begins as a write ends).
    cnt_eff = (ops != ops_q) ? '0 : cnt;
    pre_n   = act;
    wl      = act && (cnt_eff >= CNT_W'(PRE_CYCLES)) &&
              (!REGEN || (cnt_eff < CNT_W'(CNT_MAX)));
    wl_write = wl && !wen_n;
    wl_read  = wl && !ren_n;
    wl_scan  = wl && !sen_n;
    sae_n    = !(wl_read || wl_scan);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      ops_q     <= '0;
      wl_cycles <= '0;
    end else begin
      ops_q <= ops;
      if (!act)                            cnt <= '0;
      else if (cnt_eff != CNT_W'(CNT_MAX)) cnt <= cnt_eff + 1'b1;
      else                                 cnt <= cnt_eff;
      if (wl) wl_cycles <= wl_cycles + 1;
    end
  end

  // The 6-transistor cell has one bit-line pair: scan and write/read must not overlap.
  a_one_enable : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({!wen_n, !ren_n, !sen_n}));
endmodule
