// tb_aes128_enc_pipe: checks the pipelined AES-128 against the FIPS-197
// known-answer vectors and against the TB's own behavioural AES model for
// random key/plaintext pairs fed back to back, one per cycle. Also checks
// that every result appears exactly 11 cycles after its input.
module tb_aes128_enc_pipe;
  import tb_aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid;
  logic [127:0] in_key, in_blk;
  logic [15:0]  in_side;
  logic         out_valid;
  logic [127:0] out_blk;
  logic [15:0]  out_side;

  aes128_enc_pipe #(.SIDE_W(16)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int N = 64;
  logic [127:0] exp_ct [N];
  int           t_in   [N];
  int           nout = 0;

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (out_blk !== exp_ct[out_side[5:0]]) begin
        failures++;
        $display("FAIL idx %0d got %h exp %h", out_side, out_blk, exp_ct[out_side[5:0]]);
      end
      checks++;
      if (cycle - t_in[out_side[5:0]] != 11) begin
        failures++;
        $display("FAIL latency idx %0d = %0d", out_side, cycle - t_in[out_side[5:0]]);
      end
      nout++;
    end
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, p;
    in_valid = 0; in_key = 0; in_blk = 0; in_side = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // FIPS-197 known answers, checked against the reference model too.
    checks++;
    if (ref_aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    checks++;
    if (ref_aes128(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734)
        !== 128'h3925841d02dc09fbdc118597196a0b32) failures++;
    for (int i = 0; i < N; i++) begin
      if (i == 0) begin
        k = 128'h000102030405060708090a0b0c0d0e0f; p = 128'h00112233445566778899aabbccddeeff;
        exp_ct[i] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
      end else if (i == 1) begin
        k = 128'h2b7e151628aed2a6abf7158809cf4f3c; p = 128'h3243f6a8885a308d313198a2e0370734;
        exp_ct[i] = 128'h3925841d02dc09fbdc118597196a0b32;
      end else begin
        k = {$urandom, $urandom, $urandom, $urandom};
        p = {$urandom, $urandom, $urandom, $urandom};
        exp_ct[i] = ref_aes128(k, p);
      end
      @(negedge clk);
      in_valid = 1; in_key = k; in_blk = p; in_side = 16'(i);
      t_in[i] = cycle;
      // a few bubbles
      if (i % 7 == 6) begin
        @(negedge clk); in_valid = 0;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
