// tb_trivium_prng: unrolled Trivium PRNG at its default unrolling (512) and at 64. After
// seeding, each output word must equal the next UNROLL keystream bits of a bit-serial
// Trivium model in this testbench, with the warm-up rounds skipped. The model is written
// from the textbook state-update equations, indexed s1..s288. `ready` must rise after
// exactly the warm-up cycles and rnd must change every cycle. A re-seed restarts the
// stream.
module tb_trivium_prng;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, seed;
  logic [79:0] key, iv;
  logic rdy_a, rdy_b;
  logic [511:0] rnd_a;
  logic [63:0]  rnd_b;

  trivium_prng                u_a (.clk, .rst_n, .seed, .key, .iv, .ready(rdy_a), .rnd(rnd_a));
  trivium_prng #(.UNROLL(64)) u_b (.clk, .rst_n, .seed, .key, .iv, .ready(rdy_b), .rnd(rnd_b));

  // Bit-serial reference, s[1..288].
  class triv_model;
    bit s [1:288];
    function void load(bit [79:0] k, bit [79:0] v);
      foreach (s[i]) s[i] = 0;
      for (int i = 1; i <= 80; i++) begin s[i] = k[i-1]; s[93+i] = v[i-1]; end
      s[286] = 1; s[287] = 1; s[288] = 1;
    endfunction
    function bit step();
      bit t1, t2, t3, z;
      t1 = s[66] ^ s[93]; t2 = s[162] ^ s[177]; t3 = s[243] ^ s[288];
      z = t1 ^ t2 ^ t3;
      t1 ^= (s[91] & s[92]) ^ s[171];
      t2 ^= (s[175] & s[176]) ^ s[264];
      t3 ^= (s[286] & s[287]) ^ s[69];
      for (int i = 288; i > 178; i--) s[i] = s[i-1];
      s[178] = t2;
      for (int i = 177; i > 94; i--) s[i] = s[i-1];
      s[94] = t1;
      for (int i = 93; i > 1; i--) s[i] = s[i-1];
      s[1] = t3;
      return z;
    endfunction
  endclass

  triv_model ma = new, mb = new;

  task automatic run_seed(int words);
    int cyc_a, cyc_b;
    logic [511:0] ea, prev_a;
    logic [63:0]  eb;
    key = {$urandom(), $urandom(), $urandom()};
    iv  = {$urandom(), $urandom(), $urandom()};
    ma.load(key, iv); mb.load(key, iv);
    repeat (3 * 512) void'(ma.step());    // 1152 rounds rounded up to whole 512-round cycles
    repeat (18 * 64) void'(mb.step());    // 1152 / 64 = 18 cycles
    @(negedge clk) seed = 1'b1;
    @(negedge clk) seed = 1'b0;
    cyc_a = 0; cyc_b = 0;
    while (!rdy_b) begin @(negedge clk); cyc_b++; end
    // UNROLL=64: the first word appears after 18 warm-up cycles plus the output cycle
    checks++; if (cyc_b != 18 + 1) begin failures++; $display("ready(64) after %0d", cyc_b); end
    for (int w = 0; w < words; w++) begin
      for (int n = 0; n < 64; n++) eb[n] = mb.step();
      checks++; if (rnd_b !== eb) begin failures++; $display("word64 %0d mismatch", w); end
      @(negedge clk);
    end
    // restart for the wide instance
    @(negedge clk) seed = 1'b1;
    @(negedge clk) seed = 1'b0;
    while (!rdy_a) begin @(negedge clk); cyc_a++; end
    checks++; if (cyc_a != 3 + 1) begin failures++; $display("ready(512) after %0d", cyc_a); end
    prev_a = '0;
    for (int w = 0; w < words; w++) begin
      for (int n = 0; n < 512; n++) ea[n] = ma.step();
      checks++; if (rnd_a !== ea) begin failures++; $display("word512 %0d mismatch", w); end
      checks++; if (rnd_a == prev_a) failures++;
      prev_a = rnd_a;
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0; seed = 1'b0; key = '0; iv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (rdy_a || rdy_b) failures++;
    run_seed(20);
    run_seed(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
