// trivium_prng: unrolled Trivium keystream generator used as the randomness source.
//
// Every gadget randomness input of a masked pipeline is wired to one output bit of this
// PRNG. The PRNG refreshes all UNROLL output bits every cycle, so the pipeline can accept a
// new operation every cycle. It runs UNROLL rounds of the Trivium state update per clock
// cycle and outputs the UNROLL keystream bits produced by those rounds. UNROLL = 512 is
// the unrolling factor assumed when costing the randomness.
//
// Trivium round (state s_1..s_288, s_k at state[k-1]):
//   t1 = s66 ^ s93,  t2 = s162 ^ s177,  t3 = s243 ^ s288,  z = t1 ^ t2 ^ t3
//   t1 ^= s91&s92 ^ s171,  t2 ^= s175&s176 ^ s264,  t3 ^= s286&s287 ^ s69
//   (s1..s93) <- (t3, s1..s92), (s94..s177) <- (t1, s94..s176), (s178..s288) <- (t2, s178..s287)
// Seeding: on `seed` the state is loaded with key into s1..s80, iv into s94..s173 and ones
// into s286..s288, other bits zero. Then WARMUP_CYCLES cycles of UNROLL rounds run
// without output: the least whole number of cycles covering Trivium's 4*288 warm-up
// rounds. So for UNROLL = 512 the warm-up is 1536 rounds, not exactly 1152, and the
// stream differs from a standard Trivium keystream at that offset. The seeding and
// handshake are this design's choice.
//
// Interface: active-low synchronous reset; `seed` (one cycle) loads key/iv; `ready` goes
// high when the warm-up ends. From then on `rnd` holds fresh bits every cycle. Bit n of
// rnd is the keystream bit of the n-th round of the cycle.
module trivium_prng #(
  parameter int UNROLL = 512,
  localparam int WARMUP_CYCLES = (4 * 288 + UNROLL - 1) / UNROLL
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed,
  input  logic [79:0]       key,
  input  logic [79:0]       iv,
  output logic              ready,
  output logic [UNROLL-1:0] rnd
);

  typedef logic [287:0] state_t;

  state_t state_q, state_next;
  logic [UNROLL-1:0] ks;
  logic [$clog2(WARMUP_CYCLES+1)-1:0] warm_cnt_q;

  // One Trivium round; returns the next state, the keystream bit goes to z.
  function automatic state_t trivium_round(state_t st, output logic z);
    logic t1, t2, t3;
    state_t nx;
    t1 = st[65] ^ st[92];
    t2 = st[161] ^ st[176];
    t3 = st[242] ^ st[287];
    z  = t1 ^ t2 ^ t3;
    t1 = t1 ^ (st[90] & st[91]) ^ st[170];
    t2 = t2 ^ (st[174] & st[175]) ^ st[263];
    t3 = t3 ^ (st[285] & st[286]) ^ st[68];
    nx[92:0]    = {st[91:0], t3};
    nx[176:93]  = {st[175:93], t1};
    nx[287:177] = {st[286:177], t2};
    return nx;
  endfunction

  always_comb begin
    state_t st;
    logic z;
    st = state_q;
    for (int n = 0; n < UNROLL; n++) begin
      st = trivium_round(st, z);
      ks[n] = z;
    end
    state_next = st;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= '0;
      warm_cnt_q <= '0;
      ready      <= 1'b0;
      rnd        <= '0;
    end else if (seed) begin
      state_q            <= '0;
      state_q[79:0]      <= key;
      state_q[172:93]    <= iv;
      state_q[287:285]   <= 3'b111;
      warm_cnt_q         <= '0;
      ready              <= 1'b0;
    end else begin
      state_q <= state_next;
      if (warm_cnt_q < ($bits(warm_cnt_q))'(WARMUP_CYCLES)) begin
        warm_cnt_q <= warm_cnt_q + 1'b1;
      end else begin
        ready <= 1'b1;
        rnd   <= ks;
      end
    end
  end

endmodule
