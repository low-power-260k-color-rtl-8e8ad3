// sen_mask: the masking circuit in front of the graphic memory.
//
// In a 6-transistor graphic SRAM the scan operation uses the same bit/bitb lines as a
// write or read, so the two may never overlap. The scan enable SEN1 (active low, low for
// the scan part of every display line) is therefore masked by the MPU's write/read enable
// WEN (active low): wherever WEN is low, SEN2 is forced high. The result, SEN2, is a train
// of scan pulses that fill the gaps between memory accesses, and it is exactly the scan
// enable the memory saw before redundant scan removal was added.
//
// The circuit is purely combinational; SEN2 follows its inputs in the same cycle. Having
// the write/read strobe take priority follows the original chip; that the mask is a plain OR of
// the active-low signals is this design's choice.
module sen_mask (
  input  logic sen1_n,  // scan enable from the timing controller, active low
  input  logic wen_n,   // write/read enable from the MPU side, active low
  output logic sen2_n   // masked scan enable, active low
);
  always_comb sen2_n = sen1_n | ~wen_n;
endmodule
