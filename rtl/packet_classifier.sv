// packet_classifier: turns the pattern matches seen inside one packet into a
// verdict for that packet.
//
// While a packet's bytes stream past, every pattern hit is collected in a
// register (sop starts a fresh collection with the first byte's hits). On the
// packet's last byte (valid with eop) the collection, including that byte's
// hits, is copied to pkt_hits, pkt_malicious is set when any pattern occurred
// and pkt_done pulses for one cycle; all three appear the clock after the
// last byte. A packet with no hit is benign. The document only says that a
// packet is classified once its patterns are found or not found; the sop/eop
// framing and this timing are this design's choices.
module packet_classifier #(
  parameter int unsigned NP = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  logic          sop,
  input  logic          eop,
  input  logic [NP-1:0] hit,
  output logic          pkt_done,
  output logic          pkt_malicious,
  output logic [NP-1:0] pkt_hits
);

  logic [NP-1:0] seen_q;
  logic [NP-1:0] seen_d;

  always_comb begin
    seen_d = (sop ? '0 : seen_q) | hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q        <= '0;
      pkt_done      <= 1'b0;
      pkt_malicious <= 1'b0;
      pkt_hits      <= '0;
    end else begin
      pkt_done <= 1'b0;
      if (valid) begin
        if (eop) begin
          seen_q        <= '0;
          pkt_done      <= 1'b1;
          pkt_malicious <= |seen_d;
          pkt_hits      <= seen_d;
        end else begin
          seen_q <= seen_d;
        end
      end
    end
  end

endmodule
