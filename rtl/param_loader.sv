// param_loader: writes the host's parameter stream into on-chip memories.
//
// The host sends a 32-bit header word (through rx32): bits 31:28 name the
// target memory (lq_pkg::tgt_e), bits 27:0 the number of payload items. For
// word targets the payload is that many 32-bit words, each written to
// consecutive addresses from 0. For TGT_WCODE the payload is that many raw
// nibbles, each holding two merged 2-bit weight codes; these bypass rx32
// and are written one nibble per cycle (wr_nib = 1). TGT_START carries no
// payload and pulses start. The header format and the start command are this
// design's choice; the split into 32-bit values and merged 4-bit weight
// values follows the host interface of the quantized layer.
//
// Timing: a word write appears one cycle after its last nibble, a nibble
// write one cycle after the nibble. Nibbles may arrive back to back, with no
// gap after a header.
module param_loader
  import lq_pkg::*;
#(
  parameter int ADDR_W = 28
) (
  input  logic              clk,
  input  logic              rst_n,
  input  nib_t              nib,
  input  logic              nib_valid,
  output logic              wr_en,
  output tgt_e              wr_tgt,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic              wr_nib,
  output logic              start
);

  typedef enum logic [1:0] {S_HDR, S_WORD, S_NIB} state_e;

  state_e      state;
  logic [27:0] remain;
  logic [31:0] word;
  logic        word_valid;
  logic        hdr_nib;

  // A nibble-mode header completes in the same cycle as the first payload
  // nibble may arrive; that nibble must not enter rx32.
  assign hdr_nib = (state == S_HDR) && word_valid && (tgt_e'(word[31:28]) == TGT_WCODE);

  rx32 u_rx (
    .clk, .rst_n,
    .clr       (state == S_NIB || hdr_nib),
    .nib,
    .nib_valid (nib_valid && state != S_NIB && !hdr_nib),
    .word,
    .word_valid
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_HDR;
      remain  <= '0;
      wr_en   <= 1'b0;
      wr_tgt  <= TGT_IMG;
      wr_addr <= '0;
      wr_data <= '0;
      wr_nib  <= 1'b0;
      start   <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      start <= 1'b0;
      // the address advances after each write
      if (wr_en) wr_addr <= wr_addr + 1'b1;
      unique case (state)
        S_HDR: if (word_valid) begin
          wr_tgt  <= tgt_e'(word[31:28]);
          wr_addr <= '0;
          remain  <= word[27:0];
          wr_nib  <= (tgt_e'(word[31:28]) == TGT_WCODE);
          if (tgt_e'(word[31:28]) == TGT_START) begin
            start <= 1'b1;
          end else if (hdr_nib && nib_valid && word[27:0] != '0) begin
            // first payload nibble arrived together with the header
            wr_en   <= 1'b1;
            wr_data <= {28'd0, nib};
            remain  <= word[27:0] - 1'b1;
            if (word[27:0] != 28'd1) state <= S_NIB;
          end else if (word[27:0] != '0) begin
            state <= hdr_nib ? S_NIB : S_WORD;
          end
        end
        S_WORD: if (word_valid) begin
          wr_en   <= 1'b1;
          wr_data <= word;
          remain  <= remain - 1'b1;
          if (remain == 28'd1) state <= S_HDR;
        end
        S_NIB: if (nib_valid) begin
          wr_en   <= 1'b1;
          wr_data <= {28'd0, nib};
          remain  <= remain - 1'b1;
          if (remain == 28'd1) state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end

endmodule
