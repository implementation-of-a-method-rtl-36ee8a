// tb_prior_encoder: checks the bubble-tolerant thermometer encoder.
//
// Drives thermometer codes (k zeros from bit 0, ones above) of the full
// 759-bit width, with and without bubbles (isolated wrong bits below the
// transition, which must not change the result, and a zero above the
// transition, which the encoder reports as the highest transition). The
// expected value is computed here by scanning from the top. Also checks the
// two-edge latency of `valid` and that the output holds when decode is low.
module tb_prior_encoder;
  timeunit 1ps;
  timeprecision 10fs;

  localparam int N = 759;

  logic clk = 0, rst = 0, decode = 0;
  logic [N-1:0] incoming_bits = '1;
  logic [15:0]  decoded_number;
  logic         valid;
  int checks = 0, failures = 0;

  prior_encoder #(.NUM_OF_IN_BITS(N), .NUM_OF_OUT_BITS(15)) dut (.*);

  always #2000 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_enc(input logic [N-1:0] v);
    for (int i = N - 1; i >= 0; i--) if (!v[i]) return i + 1;
    return 0;
  endfunction

  function automatic logic [N-1:0] thermo(input int k);
    logic [N-1:0] v = '1;
    for (int i = 0; i < k; i++) v[i] = 1'b0;
    return v;
  endfunction

  task automatic apply(input logic [N-1:0] v, input string tag);
    @(negedge clk);
    incoming_bits = v;
    decode = 1;
    @(posedge clk); #1;
    check(!valid, {tag, ": valid not yet after first edge"});
    @(posedge clk); #1;
    check(valid, {tag, ": valid after second edge"});
    check(int'(decoded_number) == ref_enc(v),
          $sformatf("%s: got %0d exp %0d", tag, decoded_number, ref_enc(v)));
    @(negedge clk);
    decode = 0;
    incoming_bits = ~v;
    @(posedge clk); #1;
    check(int'(decoded_number) == ref_enc(v), {tag, ": holds while decode low"});
  endtask

  initial begin
    #1 rst = 1; #10 rst = 0;
    apply('1, "all ones");
    apply('0, "all zeros");
    for (int k = 1; k <= N; k += 37) apply(thermo(k), $sformatf("thermo %0d", k));
    for (int t = 0; t < 30; t++) begin
      automatic int k = $urandom_range(5, N - 5);
      automatic logic [N-1:0] v = thermo(k);
      v[k - 1 - $urandom_range(0, 3)] = 1'b1;     // bubble below the transition
      apply(v, $sformatf("bubble below %0d", k));
      v = thermo(k);
      v[k + $urandom_range(1, 3)] = 1'b0;         // stray zero above it
      apply(v, $sformatf("bubble above %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
