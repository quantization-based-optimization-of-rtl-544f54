// Testbench for rx32: random 32-bit words are sent as eight nibbles, most
// significant first, with random idle gaps. Each word must appear exactly
// one cycle after its eighth nibble; a clr in the middle of a word must drop
// the partial word.
module tb_rx32;
  import lq_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, nib_valid = 0;
  nib_t nib = '0;
  logic [31:0] word;
  logic word_valid;
  int checks = 0, failures = 0;

  rx32 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_nib(nib_t n);
    nib = n; nib_valid = 1'b1;
    @(negedge clk);
    nib_valid = 1'b0;
  endtask

  task automatic send_word(logic [31:0] w);
    for (int i = 7; i >= 0; i--) begin
      send_nib(w[4*i +: 4]);
      if (i != 0) repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    // the word is registered on the edge that took the last nibble
    checks++;
    if (!word_valid || word !== w) begin
      failures++;
      $display("FAIL word %h got %h valid %0d", w, word, word_valid);
    end
    @(negedge clk);
    checks++;
    if (word_valid) begin failures++; $display("FAIL valid longer than one cycle"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) send_word($urandom);
    // partial word, then clear
    repeat (3) send_nib(4'hF);
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    send_word(32'h1234_5678);
    send_word(32'hDEAD_BEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
