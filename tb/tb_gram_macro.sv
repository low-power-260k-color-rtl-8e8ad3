// tb_gram_macro: random writes, reads and scans on a small macro-block, checked against
// an array model. Unselected writes and reads must have no effect; the read and scan
// outputs are registered (one cycle) and must hold between operations.
module tb_gram_macro;
  localparam int ROWS = 12, WORDS = 5, PB = 18;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel = 1'b0, wr = 1'b0, rd = 1'b0, scan = 1'b0;
  logic [3:0] row = '0;
  logic [2:0] word = '0;
  logic [PB-1:0] wdata = '0, rdata;
  logic [WORDS*PB-1:0] sdout;
  logic [PB-1:0] model [ROWS][WORDS];
  logic [PB-1:0] exp_r = '0;
  logic [WORDS*PB-1:0] exp_s = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gram_macro #(.ROWS(ROWS), .WORDS(WORDS), .PIX_BITS(PB)) dut (
    .clk, .rst_n, .sel, .wr, .rd, .scan, .row, .word, .wdata, .rdata, .sdout);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Fill every location so the model is fully known.
    for (int r = 0; r < ROWS; r++)
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        sel = 1'b1; wr = 1'b1; row = 4'(r); word = 3'(w);
        wdata = PB'($urandom); model[r][w] = wdata;
      end
    @(negedge clk) wr = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      int kind;
      @(negedge clk);
      // check the outputs of the previous operation
      checks += 2;
      if (rdata !== exp_r) begin failures++; $display("FAIL rdata %h want %h", rdata, exp_r); end
      if (sdout !== exp_s) begin failures++; $display("FAIL sdout %h want %h", sdout, exp_s); end
      kind = $urandom_range(0, 4);
      sel = ($urandom_range(0, 3) != 0);
      wr = 1'b0; rd = 1'b0; scan = 1'b0;
      row = 4'($urandom_range(0, ROWS - 1));
      word = 3'($urandom_range(0, WORDS - 1));
      wdata = PB'($urandom);
      case (kind)
        0, 1: begin wr = 1'b1; if (sel) model[row][word] = wdata; end
        2: begin rd = 1'b1; if (sel) exp_r = model[row][word]; end
        3: begin
          scan = 1'b1;
          for (int w = 0; w < WORDS; w++) exp_s[w*PB +: PB] = model[row][w];
        end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
