// Round constant module of Keccak-f[1600].
//
// Maps the round number (0..23) to the 64-bit constant added by iota. As the
// document suggests, it is a combinational table rather than a RAM, since most
// constant bits are zero. The values are those of the Keccak specification
// (the output of its degree-8 LFSR). A round number above 23 gives zero.
module keccak_rc
  import keccak_pkg::*;
(
  input  logic [4:0] round_i,
  output lane_t      rc_o
);

  always_comb begin
    unique case (round_i)
      5'd0:    rc_o = 64'h0000_0000_0000_0001;
      5'd1:    rc_o = 64'h0000_0000_0000_8082;
      5'd2:    rc_o = 64'h8000_0000_0000_808A;
      5'd3:    rc_o = 64'h8000_0000_8000_8000;
      5'd4:    rc_o = 64'h0000_0000_0000_808B;
      5'd5:    rc_o = 64'h0000_0000_8000_0001;
      5'd6:    rc_o = 64'h8000_0000_8000_8081;
      5'd7:    rc_o = 64'h8000_0000_0000_8009;
      5'd8:    rc_o = 64'h0000_0000_0000_008A;
      5'd9:    rc_o = 64'h0000_0000_0000_0088;
      5'd10:   rc_o = 64'h0000_0000_8000_8009;
      5'd11:   rc_o = 64'h0000_0000_8000_000A;
      5'd12:   rc_o = 64'h0000_0000_8000_808B;
      5'd13:   rc_o = 64'h8000_0000_0000_008B;
      5'd14:   rc_o = 64'h8000_0000_0000_8089;
      5'd15:   rc_o = 64'h8000_0000_0000_8003;
      5'd16:   rc_o = 64'h8000_0000_0000_8002;
      5'd17:   rc_o = 64'h8000_0000_0000_0080;
      5'd18:   rc_o = 64'h0000_0000_0000_800A;
      5'd19:   rc_o = 64'h8000_0000_8000_000A;
      5'd20:   rc_o = 64'h8000_0000_8000_8081;
      5'd21:   rc_o = 64'h8000_0000_0000_8080;
      5'd22:   rc_o = 64'h0000_0000_8000_0001;
      5'd23:   rc_o = 64'h8000_0000_8000_8008;
      default: rc_o = '0;
    endcase
  end

endmodule
