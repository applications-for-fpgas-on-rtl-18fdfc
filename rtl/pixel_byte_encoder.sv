// pixel_byte_encoder: re-encodes 10-bit pixels as pairs of bytes for an
// 8-bit serial link.
// A pixel taken from the buffer (valid/ready handshake on the input side)
// is sent as two bytes: first pixel[9:2] (the 8 most significant bits, a
// plain 8-bit image), then {6'b0, pixel[1:0]} (the two remaining bits).
// Output side: byte_valid_o/byte_ready_i; a byte is transferred when both
// are high. A new pixel is accepted only after its second byte has gone.
// From the description: each 10-bit pixel becomes a pair of 8-bit values.
// The split of the bits between the two bytes is this design's choice.
module pixel_byte_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] pixel_i,
  input  logic       pixel_valid_i,
  output logic       pixel_ready_o,
  output logic [7:0] byte_o,
  output logic       byte_valid_o,
  input  logic       byte_ready_i
);
  logic [9:0] pix_q;
  logic       full_q, second_q;

  assign pixel_ready_o = !full_q;
  assign byte_valid_o  = full_q;
  assign byte_o        = second_q ? {6'b0, pix_q[1:0]} : pix_q[9:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_q    <= '0;
      full_q   <= 1'b0;
      second_q <= 1'b0;
    end else if (!full_q) begin
      if (pixel_valid_i) begin
        pix_q    <= pixel_i;
        full_q   <= 1'b1;
        second_q <= 1'b0;
      end
    end else if (byte_ready_i) begin
      if (second_q) full_q <= 1'b0;
      second_q <= ~second_q;
    end
  end
endmodule
