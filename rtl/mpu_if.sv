// mpu_if: the MPU interface of the source driver (80-series style parallel bus).
//
// The external MPU drives chip select CSB, write strobe WR, read strobe RD and register
// select RS (all active low except RS) together with the 18-bit data bus DB[17:0]. The
// strobes are brought into the clock domain through two-flip-flop synchronisers; the data
// bus goes through the same two stages so that it stays aligned with them. Bus cycles are
// decoded as follows:
//   * RS = 0 write: address set. DB[15:8] is the row (gate line), DB[7:0] the column
//     (pixel); addr_load pulses for one cycle.
//   * RS = 1 write: pixel write. At the end of the WR strobe the pixel is latched and the
//     memory write enable wen_n is driven low for WR_PULSE cycles; addr_inc pulses once
//     when it ends.
//   * RS = 1 read: pixel read. At the start of the RD strobe ren_n is driven low for
//     RD_PULSE cycles; one cycle later the memory's read data is latched onto db_out and
//     addr_inc pulses. db_oe is high while CSB and RD are low.
// Timing: the MPU must keep DB valid one clock after WR rises, must hold RD low for at
// least RD_PULSE + 4 clocks before sampling DB, and must leave WR_PULSE + 4 clocks between
// strobes. WR_PULSE and RD_PULSE must be at least the memory's settle plus word-line
// cycles (2 with the defaults) or the access does not take place. The original chip defines the bus pins; the command encoding, the single 18-bit bus
// mode and all cycle counts are this design's choice (the IM interface-mode pins are not
// decoded).
module mpu_if #(
  parameter int unsigned WR_PULSE = 2,  // memory write enable width, cycles
  parameter int unsigned RD_PULSE = 2   // memory read enable width, cycles
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        csb,        // chip select, active low
  input  logic        wr_n,       // write strobe, active low
  input  logic        rd_n,       // read strobe, active low
  input  logic        rs,         // register select: 0 address, 1 pixel data
  input  logic [17:0] db_in,
  output logic [17:0] db_out,
  output logic        db_oe,
  input  logic [17:0] mem_rdata,  // from the graphic memory
  output logic        wen_n,      // memory write enable, active low
  output logic        ren_n,      // memory read enable, active low
  output logic [17:0] wdata,
  output logic        addr_load,
  output logic [7:0]  load_row,
  output logic [7:0]  load_col,
  output logic        addr_inc
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ, S_RDCAP} state_t;

  localparam int unsigned PW  = (WR_PULSE > RD_PULSE) ? WR_PULSE : RD_PULSE;
  localparam int unsigned PCW = $clog2(PW + 1);

  logic [1:0]  cs_s, wr_s, rd_s, rs_s;   // synchroniser chains, [1] is the output
  logic [17:0] db_s [2];
  logic        wr_q, rd_q;               // previous synchronised strobes
  logic        wr_end, rd_start;
  state_t      state;
  logic [PCW-1:0] pcnt;

  always_comb begin
    wr_end   = !wr_q &&  wr_s[1] && !cs_s[1];
    rd_start =  rd_q && !rd_s[1] && !cs_s[1] && rs_s[1];
    wen_n    = (state != S_WRITE);
    ren_n    = (state != S_READ);
    db_oe    = !cs_s[1] && !rd_s[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_s <= '1; wr_s <= '1; rd_s <= '1; rs_s <= '0;
      db_s[0] <= '0; db_s[1] <= '0;
      wr_q <= 1'b1; rd_q <= 1'b1;
      state <= S_IDLE; pcnt <= '0;
      wdata <= '0; db_out <= '0;
      addr_load <= 1'b0; load_row <= '0; load_col <= '0; addr_inc <= 1'b0;
    end else begin
      cs_s <= {cs_s[0], csb};
      wr_s <= {wr_s[0], wr_n};
      rd_s <= {rd_s[0], rd_n};
      rs_s <= {rs_s[0], rs};
      db_s[0] <= db_in;
      db_s[1] <= db_s[0];
      wr_q <= wr_s[1];
      rd_q <= rd_s[1];
      addr_load <= 1'b0;
      addr_inc  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (wr_end && !rs_s[1]) begin
            addr_load <= 1'b1;
            load_row  <= db_s[1][15:8];
            load_col  <= db_s[1][7:0];
          end else if (wr_end) begin
            wdata <= db_s[1];
            pcnt  <= PCW'(WR_PULSE - 1);
            state <= S_WRITE;
          end else if (rd_start) begin
            pcnt  <= PCW'(RD_PULSE - 1);
            state <= S_READ;
          end
        end
        S_WRITE: begin
          if (pcnt == '0) begin
            addr_inc <= 1'b1;
            state    <= S_IDLE;
          end else pcnt <= pcnt - 1'b1;
        end
        S_READ: begin
          if (pcnt == '0) state <= S_RDCAP;
          else            pcnt  <= pcnt - 1'b1;
        end
        S_RDCAP: begin
          db_out   <= mem_rdata;
          addr_inc <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
