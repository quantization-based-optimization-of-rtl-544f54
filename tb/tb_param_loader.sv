// Testbench for param_loader: a host stream mixing word transfers to several
// targets, a nibble (merged weight) transfer, an empty transfer and a start
// command. Every write must come out with the right target, consecutive
// addresses from 0, the right data and the nibble flag; start must pulse once.
module tb_param_loader;
  import lq_pkg::*;

  logic clk = 0, rst_n = 0, nib_valid = 0;
  nib_t nib = '0;
  logic wr_en, wr_nib, start;
  tgt_e wr_tgt;
  logic [27:0] wr_addr;
  logic [31:0] wr_data;
  typedef struct { tgt_e t; int a; logic [31:0] d; logic n; } wr_t;
  wr_t expq[$];
  int checks = 0, failures = 0, starts = 0, nibw = 0, wordw = 0;
  bit nogap = 0;

  param_loader #(.ADDR_W(28)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (start) starts++;
    if (wr_en) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected write"); end
      else begin
        wr_t e;
        e = expq.pop_front();
        if (wr_tgt !== e.t || int'(wr_addr) != e.a || wr_data !== e.d || wr_nib !== e.n) begin
          failures++;
          $display("FAIL write tgt %0d addr %0d data %h nib %0d, exp %0d %0d %h %0d",
                   wr_tgt, wr_addr, wr_data, wr_nib, e.t, e.a, e.d, e.n);
        end
        if (wr_nib) nibw++; else wordw++;
      end
    end
  end

  task automatic send_nib(nib_t n);
    nib = n; nib_valid = 1'b1;
    @(negedge clk);
    nib_valid = 1'b0;
    if (!nogap) repeat ($urandom_range(0, 1)) @(negedge clk);
  endtask
  task automatic send_word(logic [31:0] w);
    for (int i = 7; i >= 0; i--) send_nib(w[4*i +: 4]);
  endtask
  task automatic words(tgt_e t, int n);
    send_word({t, 28'(n)});
    for (int i = 0; i < n; i++) begin
      wr_t e;
      e.t = t; e.a = i; e.d = $urandom; e.n = 1'b0;
      expq.push_back(e);
      send_word(e.d);
    end
  endtask
  task automatic nibbles(int n);
    send_word({TGT_WCODE, 28'(n)});
    for (int i = 0; i < n; i++) begin
      wr_t e;
      e.t = TGT_WCODE; e.a = i; e.d = 32'($urandom_range(0, 15)); e.n = 1'b1;
      expq.push_back(e);
      send_nib(e.d[3:0]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    words(TGT_IMG, 10);
    nogap = 1;          // back-to-back nibbles, none after the header
    nibbles(13);
    nibbles(1);
    words(TGT_W, 4);
    nogap = 0;
    words(TGT_BIAS, 3);
    send_word({TGT_SCALE, 28'd0});   // empty transfer
    nibbles(5);
    words(TGT_LUT, 16);
    send_word({TGT_START, 28'd0});
    words(TGT_QBASIS, 2);
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d writes missing", expq.size()); end
    checks++;
    if (starts != 1) begin failures++; $display("FAIL start pulses %0d", starts); end
    checks++;
    if (nibw != 19 || wordw != 35) begin failures++; $display("FAIL counts %0d %0d", nibw, wordw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
