// conv_loop_ctrl: the loop nest of one output channel of a convolution.
//
// For one output channel the window engine must visit every input channel
// and every output position; partial sums of successive input channels are
// added into the same output-plane entry. The loops run input channel
// (outermost), output row, output column (innermost), and the whole nest is
// pipelined with an initiation interval of one: a new (ic, oy, ox) triple is
// issued every cycle, so one pass takes exactly IC*OH*OW cycles.
//
// Interface: a start pulse while idle begins a pass. valid is high on the
// cycles that carry a triple; first marks triples of input channel 0 (the
// accumulator is loaded rather than added to) and last the final triple.
// done pulses one cycle after the last triple. busy is high from the cycle
// after start up to and including the last triple.
module conv_loop_ctrl #(
  parameter int IC = 96,
  parameter int OH = 27,
  parameter int OW = 27
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic                      busy,
  output logic                      valid,
  output logic [$clog2(IC+1)-1:0]   ic,
  output logic [$clog2(OH+1)-1:0]   oy,
  output logic [$clog2(OW+1)-1:0]   ox,
  output logic                      first,
  output logic                      last,
  output logic                      done
);

  assign valid = busy;
  assign first = (ic == '0);
  assign last  = busy && (int'(ic) == IC - 1) && (int'(oy) == OH - 1) && (int'(ox) == OW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ic   <= '0;
      oy   <= '0;
      ox   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          ic   <= '0;
          oy   <= '0;
          ox   <= '0;
        end
      end else if (last) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else if (int'(ox) == OW - 1) begin
        ox <= '0;
        if (int'(oy) == OH - 1) begin
          oy <= '0;
          ic <= ic + 1'b1;
        end else begin
          oy <= oy + 1'b1;
        end
      end else begin
        ox <= ox + 1'b1;
      end
    end
  end

endmodule
