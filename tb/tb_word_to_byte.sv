// Checks the 512-to-8-bit converter: random digests are serialised byte 0
// first under random back-pressure, with the last flag on byte 63 and the
// error flag carried on every byte; one byte per cycle when not stalled.
module tb_word_to_byte;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [511:0] d;
  logic         derr, dvalid, dready;
  logic [7:0]   b;
  logic         blast, berr, bvalid, bready;

  word_to_byte dut (
    .clk, .rst_n, .in_dig_i(d), .in_error_i(derr), .in_valid_i(dvalid), .in_ready_o(dready),
    .out_byte_o(b), .out_last_o(blast), .out_error_o(berr), .out_valid_o(bvalid), .out_ready_i(bready)
  );

  initial begin
    dvalid = 0; bready = 0; d = '0; derr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [511:0] v;
      int cyc;
      for (int w = 0; w < 16; w++) v[32 * w +: 32] = $urandom;
      cyc = 0;
      #1 d = v; derr = t[0]; dvalid = 1;
      do @(posedge clk); while (!dready);
      #1 dvalid = 0; d = '0;
      for (int k = 0; k < 64; k++) begin
        bready = (t < 10) ? 1'b1 : ($urandom_range(1) == 1);
        while (!(bvalid && bready)) begin
          @(posedge clk);
          #1 bready = (t < 10) ? 1'b1 : ($urandom_range(1) == 1);
          cyc++;
        end
        checks++;
        if (b !== v[8 * k +: 8] || blast !== (k == 63) || berr !== t[0]) begin
          failures++;
          $display("digest %0d byte %0d: got %h last %b err %b", t, k, b, blast, berr);
        end
        @(posedge clk);
        #1 bready = 0;
        cyc++;
      end
      if (t < 10) begin
        checks++;
        if (cyc != 64) begin
          failures++;
          $display("64 bytes took %0d cycles", cyc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
