// code_packer: merges pairs of 2-bit output codes into 4-bit words for the
// host's 4-bit port.
//
// The first code of a pair goes to bits 3:2, the second to bits 1:0. A code
// marked in_last that would start a new pair is sent alone, padded with 00
// in bits 1:0, so a frame with an odd number of codes is not held back.
// Both sides use valid/ready; a transfer happens when both are high. One
// output register: in_ready = !out_valid || out_ready, so it sustains one
// code per cycle (one nibble every two codes) while the host keeps up.
module code_packer
  import lq_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  code_t in_code,
  input  logic  in_last,
  input  logic  in_valid,
  output logic  in_ready,
  output nib_t  out_nib,
  output logic  out_valid,
  input  logic  out_ready
);

  code_t half;
  logic  have_half;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half      <= '0;
      have_half <= 1'b0;
      out_nib   <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (have_half) begin
          out_nib   <= {half, in_code};
          out_valid <= 1'b1;
          have_half <= 1'b0;
        end else if (in_last) begin
          out_nib   <= {in_code, 2'b00};
          out_valid <= 1'b1;
        end else begin
          half      <= in_code;
          have_half <= 1'b1;
        end
      end
    end
  end

endmodule
