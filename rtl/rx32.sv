// rx32: assembles the host's 4-bit parallel transfers into 32-bit words.
//
// The host can only drive a 4-bit port, so every 32-bit value arrives as
// eight nibbles, most significant nibble first (the order is this design's
// choice). Each nibble is accepted in the cycle nib_valid is high; after the
// eighth one, word_valid pulses for one cycle with the assembled word, in the
// cycle after that nibble. clr drops a partly received word.
module rx32
  import lq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  nib_t        nib,
  input  logic        nib_valid,
  output logic [31:0] word,
  output logic        word_valid
);

  logic [27:0] shreg;
  logic [2:0]  cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      cnt        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (clr) begin
        cnt <= '0;
      end else if (nib_valid) begin
        if (cnt == 3'd7) begin
          word       <= {shreg, nib};
          word_valid <= 1'b1;
        end
        shreg <= {shreg[23:0], nib};
        cnt   <= cnt + 3'd1;
      end
    end
  end

endmodule
