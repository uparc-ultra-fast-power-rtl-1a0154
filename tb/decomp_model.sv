// decomp_model: behavioural stand-in for the bitstream decompressor, used to close
// the compressed path of UPaRC in simulation. It speaks the decompressor port
// protocol of the controller (32-bit compressed words in, 64-bit beats of up to two
// words out, valid/ready on both sides, last markers) but implements a simple
// run-length code of its own, not a real compression algorithm:
//   control word {1'b1, 15'b0, n[15:0]}: the next word is repeated n times
//   control word {1'b0, 15'b0, n[15:0]}: the next n words are copied unchanged
// When STALL is set, both ports hold off at random to exercise back-pressure.
module decomp_model #(
  parameter bit STALL = 1'b1
) (
  input  logic        clk,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  input  logic        in_last,
  output logic        in_ready,
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic [1:0]  out_keep,
  output logic        out_last,
  input  logic        out_ready
);

  logic [31:0] oq [$];
  bit          in_done = 1'b0;
  int          phase = 0;        // 0: control word, 1: run value, 2: literal words
  int          cnt = 0;
  int unsigned stalls_in = 0, stalls_out = 0;
  bit          taken = 1'b0;     // the beat on the port was accepted at the last edge

  initial begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = '0;
    out_keep  = '0;
    out_last  = 1'b0;
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      unique case (phase)
        0: begin
          cnt   = int'(in_data[15:0]);
          phase = (cnt == 0) ? 0 : (in_data[31] ? 1 : 2);
        end
        1: begin
          for (int i = 0; i < cnt; i++) oq.push_back(in_data);
          phase = 0;
        end
        default: begin
          oq.push_back(in_data);
          cnt--;
          if (cnt == 0) phase = 0;
        end
      endcase
      if (in_last) in_done = 1'b1;
    end
    if (out_valid && out_ready) begin
      if (out_keep[0]) void'(oq.pop_front());
      if (out_keep[1]) void'(oq.pop_front());
      if (out_last) in_done = 1'b0;     // ready for the next bitstream
      taken = 1'b1;
    end
    if (in_valid && !in_ready) stalls_in++;
    if (out_valid && !out_ready) stalls_out++;
  end

  always @(negedge clk) begin
    in_ready <= !STALL || ($urandom_range(0, 7) != 0);
    if (!out_valid || taken) begin
      taken = 1'b0;
      // A new beat when nothing is held: two words if there are two, else one
      out_valid <= 1'b0;
      out_keep  <= 2'b00;
      out_last  <= 1'b0;
      if (oq.size() >= 2 && (!STALL || $urandom_range(0, 5) != 0)) begin
        out_valid <= 1'b1;
        out_keep  <= 2'b11;
        out_data  <= {oq[1], oq[0]};
        out_last  <= in_done && oq.size() == 2;
      end else if (oq.size() == 1 && in_done) begin
        out_valid <= 1'b1;
        out_keep  <= 2'b01;
        out_data  <= {32'h0, oq[0]};
        out_last  <= 1'b1;
      end
    end
  end

endmodule
