// stdm_link_model: behavioural stand-in for the board-to-board network in
// testbenches, not synthesizable design. The real network is a
// circuit-switched, slot-based (STDM) switch over serial links; here a code
// enters a FIFO when there is room and leaves it after a fixed latency, and
// only during the slots of a repeating frame that belong to this channel.
// That gives the link both latency and periodic backpressure.
module stdm_link_model #(
  parameter int DEPTH   = 4,
  parameter int LATENCY = 3,
  parameter int SLOTS   = 4,
  parameter int OWN     = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] in_code,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [1:0] out_code,
  output logic       out_valid,
  input  logic       out_ready
);
  logic [1:0]  mem_code[DEPTH];
  int unsigned mem_t   [DEPTH];
  int          rd, wr, cnt, slot;
  int unsigned now;

  assign in_ready = (cnt < DEPTH);
  assign out_valid = (cnt != 0) && (slot < OWN) && (now >= mem_t[rd] + LATENCY);
  assign out_code  = mem_code[rd];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= 0; wr <= 0; cnt <= 0; slot <= 0; now <= 0;
      for (int i = 0; i < DEPTH; i++) begin mem_code[i] <= '0; mem_t[i] <= 0; end
    end else begin
      now  <= now + 1;
      slot <= (slot == SLOTS - 1) ? 0 : slot + 1;
      if (out_valid && out_ready) rd <= (rd + 1) % DEPTH;
      if (in_valid && in_ready) begin
        mem_code[wr] <= in_code;
        mem_t[wr]    <= now;
        wr <= (wr + 1) % DEPTH;
      end
      cnt <= cnt + ((in_valid && in_ready) ? 1 : 0) - ((out_valid && out_ready) ? 1 : 0);
    end
  end
endmodule
