// Self-checking testbench of lfsr_rng: compares every output with a
// bit-serial model of the polynomial x^32+x^22+x^2+x+1 written out tap by
// tap, checks that the output changes every cycle, and that the low three
// bits are spread evenly over 8192 samples.
module tb_lfsr_rng;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] rnd;
  int checks = 0, failures = 0;
  int unsigned hist [8];

  lfsr_rng #(.SEED(32'h1234_5678)) dut (.clk, .rst_n, .rnd_o(rnd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] n;
    logic fb;
    fb = s[0];
    for (int i = 0; i < 31; i++) n[i] = s[i+1];
    n[31] = fb;
    if (fb) begin
      n[0]  = n[0]  ^ 1'b1;   // x^1 term lands on bit 0 after the shift
      n[1]  = n[1]  ^ 1'b1;
      n[21] = n[21] ^ 1'b1;
    end
    return n;
  endfunction

  initial begin
    logic [31:0] model, prev;
    for (int i = 0; i < 8; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1;
    model = 32'h1234_5678;
    checks++; if (rnd !== model) begin failures++; $display("seed mismatch %h", rnd); end
    for (int i = 0; i < 8192; i++) begin
      prev = rnd;
      @(posedge clk); #1;
      model = step(model);
      checks++;
      if (rnd !== model) begin
        failures++;
        if (failures < 5) $display("step %0d: got %h expected %h", i, rnd, model);
      end
      checks++; if (rnd == prev) failures++;
      hist[rnd[2:0]]++;
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (hist[i] < 900 || hist[i] > 1150) begin
        failures++; $display("value %0d seen %0d times", i, hist[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
