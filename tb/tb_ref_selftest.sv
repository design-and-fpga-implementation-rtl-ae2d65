// Checks the testbench reference model against published SHA3-512 digests
// (FIPS 202 example values for the empty string and "abc").
module tb_ref_selftest;
  import sha3_ref_pkg::*;
  int checks = 0, failures = 0;
  byte unsigned m[$];
  logic [511:0] d;
  function automatic logic [511:0] hex_to_dig(input logic [511:0] be);
    logic [511:0] r;
    for (int k = 0; k < 64; k++) r[8 * k +: 8] = be[8 * (63 - k) +: 8];
    return r;
  endfunction
  initial begin
    m = {};
    d = sha3_512(m);
    checks++;
    if (d != hex_to_dig(512'ha69f73cca23a9ac5c8b567dc185a756e97c982164fe25859e0d1dcc1475c80a615b2123af1f5f94c11e3e9402c3ac558f500199d95b6d3e301758586281dcd26)) begin
      failures++; $display("empty: %h", d);
    end
    m = {8'h61, 8'h62, 8'h63};
    d = sha3_512(m);
    checks++;
    if (d != hex_to_dig(512'hb751850b1a57168a5693cd924b6b096e08f621827444f70d884f5d0240d2712e10e116e9192af3c91a7ec57647e3934057340b4cf408d5a56592f8274eec53f0)) begin
      failures++; $display("abc: %h", d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
