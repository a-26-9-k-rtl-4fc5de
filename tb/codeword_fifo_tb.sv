// codeword_fifo_tb: self-checking test of the codeword buffer.
//
// Writes a first word of DEPTH random bits, then reads it back while the next
// word is written in the same cycles (the read of an entry coinciding with the
// write that replaces it, and also with the writes lagging by a few cycles,
// with gaps), and checks every bit read against the word written. Read data
// must appear the cycle after rd_en.
module codeword_fifo_tb;

  localparam int DEPTH = 50;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_first = 0, wr_data = 0;
  logic rd_en = 0, rd_first = 0, rd_data;
  int checks = 0, failures = 0;

  codeword_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic words [5][DEPTH];

  initial begin
    int rd_i, wr_i, lag;
    logic pend;
    int pend_i, pend_w;
    for (int w = 0; w < 5; w++)
      for (int j = 0; j < DEPTH; j++) words[w][j] = 1'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first word alone
    for (int j = 0; j < DEPTH; j++) begin
      @(negedge clk);
      wr_en = 1; wr_first = (j == 0); wr_data = words[0][j];
    end
    @(negedge clk);
    wr_en = 0; wr_first = 0;
    // words 1..4 written while words 0..3 are read
    for (int w = 1; w < 5; w++) begin
      lag = (w == 1) ? 0 : $urandom_range(0, 5);
      rd_i = 0; wr_i = 0; pend = 0;
      while (rd_i < DEPTH || wr_i < DEPTH || pend) begin
        @(negedge clk);
        if (pend) begin
          checks++;
          if (rd_data != words[pend_w][pend_i]) begin
            failures++;
            $display("word %0d bit %0d: read %0d", pend_w, pend_i, rd_data);
          end
        end
        pend = 0;
        rd_en = 0; rd_first = 0; wr_en = 0; wr_first = 0;
        if (rd_i < DEPTH) begin
          rd_en = 1; rd_first = (rd_i == 0);
          pend = 1; pend_i = rd_i; pend_w = w - 1;
          rd_i++;
        end
        if (rd_i > lag && wr_i < DEPTH && wr_i < rd_i && !(w == 3 && $urandom_range(0, 3) == 0)) begin
          wr_en = 1; wr_first = (wr_i == 0); wr_data = words[w][wr_i];
          wr_i++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
