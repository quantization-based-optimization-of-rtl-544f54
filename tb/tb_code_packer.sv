// Testbench for code_packer: frames of random length (odd and even) of
// random 2-bit codes are pushed with random input gaps while the output side
// applies random backpressure. The nibbles must be the codes in pairs, first
// code in bits 3:2, with an odd frame's last code padded with 00, and no
// nibble may change while it waits.
module tb_code_packer;
  import lq_pkg::*;

  logic clk = 0, rst_n = 0;
  code_t in_code = '0;
  logic in_last = 0, in_valid = 0, in_ready;
  nib_t out_nib;
  logic out_valid, out_ready = 0;
  nib_t expq[$];
  int checks = 0, failures = 0, stalls = 0, sent = 0;

  code_packer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected nibble"); end
      else begin
        nib_t e;
        e = expq.pop_front();
        if (out_nib !== e) begin failures++; $display("FAIL nib %h exp %h", out_nib, e); end
      end
    end
    if (rst_n && out_valid && !out_ready) stalls++;
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  initial begin
    code_t c, prev;
    int len;
    logic acc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 60; f++) begin
      len = $urandom_range(1, 20);
      for (int i = 0; i < len; i++) begin
        c = code_t'($urandom_range(0, 3));
        if (i % 2 == 1) expq.push_back({prev, c});
        else if (i == len - 1) expq.push_back({c, 2'b00});
        prev = c;
        in_code = c; in_last = (i == len - 1); in_valid = 1'b1;
        do begin
          #1 acc = in_ready;
          @(negedge clk);
        end while (!acc);
        in_valid = 1'b0;
        sent++;
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d nibbles missing", expq.size()); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL backpressure never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_nib);
  endproperty
  assert property (p_hold) else failures++;
endmodule
