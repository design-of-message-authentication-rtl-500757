// digest_contrast: the receiver's comparison of two message digests.
//
// When check is high, the decrypted MAC (dec_digest) is compared with the
// partial digest the receiver computed from the message it got (own_digest);
// the next edge sets match (equal) and raises valid for one cycle.  match
// holds its value until the next check.  The comparison itself is what the
// receiver does; the registered, check-strobed interface is this design's
// choice.
//
// Interface: clk, rst (synchronous, active high), check, dec_digest,
// own_digest -> match, valid.
module digest_contrast #(
  parameter int unsigned WIDTH = 128   // partial SHA-1 width
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             check,
  input  logic [WIDTH-1:0] dec_digest,
  input  logic [WIDTH-1:0] own_digest,
  output logic             match,
  output logic             valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      match <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= check;
      if (check) match <= (dec_digest == own_digest);
    end
  end
endmodule
