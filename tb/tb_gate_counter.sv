// tb_gate_counter: several frames of CL pulses with FLM on the first; gate_on must be
// one-hot on the expected line after every CL, all zero after the last line until the
// next FLM, and unchanged between CL pulses.
module tb_gate_counter;
  localparam int ROWS = 7;
  logic clk = 1'b0, rst_n = 1'b0, cl = 1'b0, flm = 1'b0;
  logic [ROWS-1:0] gate_on;
  logic [2:0] line;
  logic active;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gate_counter #(.ROWS(ROWS)) dut (.clk, .rst_n, .cl, .flm, .gate_on, .line, .active);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_line(input int l);   // l < 0: none selected
    logic [ROWS-1:0] want;
    want = (l < 0) ? '0 : ROWS'(1) << l;
    checks++;
    if (gate_on !== want) begin failures++; $display("FAIL gate_on %b want %b", gate_on, want); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) expect_line(-1);
    for (int f = 0; f < 3; f++) begin
      int lines;
      lines = (f == 1) ? ROWS - 3 : ROWS + 2;   // a short frame restarts early
      for (int l = 0; l < lines; l++) begin
        cl = 1'b1; flm = (l == 0);
        @(negedge clk);
        cl = 1'b0; flm = 1'b0;
        repeat ($urandom_range(1, 5)) begin
          expect_line(l < ROWS ? l : -1);
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
