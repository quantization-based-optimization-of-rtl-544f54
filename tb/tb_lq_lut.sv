// Testbench for lq_lut: the table is filled with products of the 2-bit
// activation and weight levels computed here from a random basis, and every
// read port is checked against that reference for random indices. Reset must
// leave all entries zero.
module tb_lq_lut;
  import lq_pkg::*;
  localparam int NRD = 4;

  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] widx = '0;
  fix_t wdata = '0;
  logic [3:0] ridx [NRD];
  fix_t rdata[NRD];
  fix_t ref_t[16];
  int checks = 0, failures = 0;

  lq_lut #(.NRD(NRD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fix_t aval(code_t a, fix_t v1, fix_t v2);
    return (a[1] ? v1 : 0) + (a[0] ? v2 : 0);
  endfunction
  function automatic fix_t wval(code_t w, fix_t c, fix_t d);
    return (w[1] ? c : -c) + (w[0] ? d : -d);
  endfunction

  initial begin
    fix_t v1, v2, c, d;
    for (int p = 0; p < NRD; p++) ridx[p] = 4'(p);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 16; i++) begin
      ridx[0] = 4'(i); #1;
      checks++;
      if (rdata[0] !== 0) begin failures++; $display("FAIL reset entry %0d", i); end
    end
    v1 = fix_t'($urandom_range(40000, 90000));
    v2 = fix_t'($urandom_range(10000, 39999));
    c  = fix_t'($urandom_range(30000, 80000));
    d  = fix_t'($urandom_range(5000, 29999));
    for (int a = 0; a < 4; a++)
      for (int w = 0; w < 4; w++)
        ref_t[a*4+w] = fix_mul(aval(code_t'(a), v1, v2), wval(code_t'(w), c, d));
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      we = 1'b1; widx = 4'(i); wdata = ref_t[i];
      @(negedge clk);
    end
    we = 1'b0;
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < NRD; p++) ridx[p] = 4'($urandom_range(0, 15));
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== ref_t[ridx[p]]) begin
          failures++;
          $display("FAIL port %0d idx %0d got %h exp %h", p, ridx[p], rdata[p], ref_t[ridx[p]]);
        end
      end
      @(negedge clk);
    end
    // activation code 00 must give zero products
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (ref_t[w] !== 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
