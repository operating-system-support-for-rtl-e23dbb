// idea_cp - IDEA encryption coprocessor written against the virtual
// interface.
//
// IDEA encrypts 64-bit blocks, as four 16-bit words, with a 128-bit key in
// eight rounds and an output transformation, mixing three operations:
// XOR, addition modulo 2^16 and multiplication modulo 2^16 + 1 (where the
// word 0 stands for 2^16). One round with subkeys Z1..Z6:
//   a = X1*Z1   b = X2+Z2   c = X3+Z3   d = X4*Z4
//   g = (a^c)*Z5   h = (b^d)+g   i = h*Z6   j = g+i
//   X1' = a^i   X2' = c^i   X3' = b^j   X4' = d^j
// and the output transformation Y = (X1*Z49, X3+Z50, X2+Z51, X4*Z52).
// The 52 subkeys are the key cut into 16-bit pieces, most significant
// first, rotated left by 25 bits after every eight pieces.
//
// Core: the round is cut into three pipeline stages (the two input
// multiplications; the middle multiplication and addition; the last
// multiplication and the output XORs). The stages form a ring, so three
// blocks are encrypted at once, one round every three core steps each: a
// group of three blocks spends 27 core steps in it. The core is slower than
// its memory side: it takes one step every CORE_DIV clocks (default 4, a
// 6 MHz core behind a 24 MHz memory side and IMU), through a clock enable
// rather than a second clock. The memory side reads a group of up to three
// blocks, runs the ring and writes the group back; while it loads and
// stores, and while the IMU stalls an access, the core waits. A run of N
// blocks with no translation misses takes
//   29 + 16 N + 27 CORE_DIV ceil(N / 3)
// clocks from CP_START to CP_FIN (5 parameter reads and 7 key-schedule
// cycles, four clocks per access).
//
// Objects: the parameter object holds N (number of blocks) in word 0 and
// the key in words 1..4 (word 1 = key bits 127:96). Object 0 is the
// plaintext, object 1 receives the ciphertext, each block as two words:
// {X1, X2} then {X3, X4}, the first 16-bit word in the upper half.
//
// From the described design: an IDEA coprocessor with three pipeline
// stages, using the virtual interface, synchronised with its memory side by
// stalling, the core at a quarter of the memory side's clock rate. The
// cipher is the standard one. How the stages are cut, the ring with three
// blocks in flight, the grouped load/run/store schedule, the clock enable in
// place of a second clock and the data layout are this design's own
// choices.
module idea_cp
  import vim_pkg::*;
#(
  parameter int unsigned CORE_DIV = 4     // memory-side clocks per core step
)
(
  input  logic              clk,
  input  logic              rst,
  input  logic              cp_start,
  output logic [OBJ_W-1:0]  cp_obj,
  output logic [ADDR_W-1:0] cp_addr,
  output logic [DATA_W-1:0] cp_dout,
  input  logic [DATA_W-1:0] cp_din,
  output logic              cp_access,
  output logic              cp_wr,
  input  logic              cp_tlbhit,
  output logic              cp_fin,
  output logic              cp_pinv
);

  localparam logic [OBJ_W-1:0] OBJ_IN  = OBJ_W'(0);
  localparam logic [OBJ_W-1:0] OBJ_OUT = OBJ_W'(1);
  localparam int unsigned      G       = 3;       // blocks in flight
  localparam int unsigned      RUN_CYC = 8 * 3 + G - 1;

  // multiplication modulo 2^16 + 1, 0 standing for 2^16
  function automatic logic [15:0] mulm(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] p;
    logic [15:0] lo, hi;
    if (x == 16'd0)      return 16'(17'd1 - {1'b0, y});
    else if (y == 16'd0) return 16'(17'd1 - {1'b0, x});
    p  = x * y;
    lo = p[15:0];
    hi = p[31:16];
    return (lo >= hi) ? 16'(lo - hi) : 16'(lo - hi + 17'd1);
  endfunction

  typedef struct packed {
    logic        valid;
    logic [1:0]  slot;
    logic [2:0]  round;
    logic [15:0] w1, w2, w3, w4;
  } blk_t;                       // block between rounds

  typedef struct packed {
    logic        valid;
    logic [1:0]  slot;
    logic [2:0]  round;
    logic [15:0] a, b, c, d;
  } st1_t;

  typedef struct packed {
    logic        valid;
    logic [1:0]  slot;
    logic [2:0]  round;
    logic [15:0] a, b, c, d, g, h;
  } st2_t;

  // ---------------- key schedule ----------------
  logic [15:0]  sk [52];
  logic [127:0] keyreg;
  logic [2:0]   kg_cnt;

  // ---------------- core ring ----------------
  blk_t  ring_in, s3;
  st1_t  s1;
  st2_t  s2;
  logic  [4:0] run_t;
  logic        running;
  logic [63:0] in_buf  [G];
  logic [63:0] out_buf [G];
  logic [1:0]  g_n;              // blocks in the current group

  // stage 1 input: inject a new block during the first G cycles, else the
  // block coming back from stage 3 for its next round
  always_comb begin
    ring_in = '0;
    if (running && run_t < 5'(G)) begin
      ring_in.valid = (run_t < 5'(g_n));
      ring_in.slot  = run_t[1:0];
      ring_in.round = 3'd0;
      {ring_in.w1, ring_in.w2, ring_in.w3, ring_in.w4} = in_buf[run_t[1:0]];
    end else if (s3.valid && s3.round != 3'd7) begin
      ring_in       = s3;
      ring_in.round = s3.round + 3'd1;
    end
  end

  // stage results, combinational
  st1_t  s1_d;
  st2_t  s2_d;
  blk_t  s3_d;
  logic [63:0] y_out;
  always_comb begin
    logic [15:0] i, j;
    s1_d.valid = ring_in.valid;
    s1_d.slot  = ring_in.slot;
    s1_d.round = ring_in.round;
    s1_d.a = mulm(ring_in.w1, sk[6 * ring_in.round + 0]);
    s1_d.b = ring_in.w2 + sk[6 * ring_in.round + 1];
    s1_d.c = ring_in.w3 + sk[6 * ring_in.round + 2];
    s1_d.d = mulm(ring_in.w4, sk[6 * ring_in.round + 3]);

    s2_d.valid = s1.valid;
    s2_d.slot  = s1.slot;
    s2_d.round = s1.round;
    s2_d.a = s1.a; s2_d.b = s1.b; s2_d.c = s1.c; s2_d.d = s1.d;
    s2_d.g = mulm(s1.a ^ s1.c, sk[6 * s1.round + 4]);
    s2_d.h = (s1.b ^ s1.d) + s2_d.g;

    i = mulm(s2.h, sk[6 * s2.round + 5]);
    j = s2.g + i;
    s3_d.valid = s2.valid;
    s3_d.slot  = s2.slot;
    s3_d.round = s2.round;
    s3_d.w1 = s2.a ^ i;
    s3_d.w2 = s2.c ^ i;
    s3_d.w3 = s2.b ^ j;
    s3_d.w4 = s2.d ^ j;

    // output transformation of a block that has finished round 8
    y_out = {mulm(s3.w1, sk[48]), 16'(s3.w3 + sk[49]), 16'(s3.w2 + sk[50]), mulm(s3.w4, sk[51])};
  end

  // core clock enable: one core step every CORE_DIV clocks, counted from
  // the start of the run phase
  logic [$clog2(CORE_DIV + 1)-1:0] cdiv;
  logic                            core_tick;
  assign core_tick = (cdiv == ($bits(cdiv))'(CORE_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst || !running) cdiv <= '0;
    else if (core_tick)  cdiv <= '0;
    else                 cdiv <= cdiv + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || !running) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else if (core_tick) begin
      s1 <= s1_d;
      s2 <= s2_d;
      s3 <= s3_d;
      if (s3.valid && s3.round == 3'd7) out_buf[s3.slot] <= y_out;
    end
  end

  // ---------------- memory side ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_PARAM, S_KEYGEN, S_LOAD, S_RUN, S_STORE, S_FIN
  } st_t;
  st_t st;

  logic [ADDR_W-1:0] n_blk, base;   // blocks in all, first block of the group
  logic [2:0]        pcnt;          // parameter word
  logic [1:0]        k;             // block within the group
  logic              half;          // word within the block

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      cp_obj    <= '0;
      cp_addr   <= '0;
      cp_dout   <= '0;
      cp_access <= 1'b0;
      cp_wr     <= 1'b0;
      cp_fin    <= 1'b0;
      cp_pinv   <= 1'b0;
      n_blk     <= '0;
      base      <= '0;
      pcnt      <= '0;
      k         <= '0;
      half      <= 1'b0;
      kg_cnt    <= '0;
      keyreg    <= '0;
      running   <= 1'b0;
      run_t     <= '0;
      g_n       <= '0;
      for (int q = 0; q < 52; q++) sk[q] <= '0;
      for (int q = 0; q < G; q++) in_buf[q] <= '0;
    end else begin
      cp_fin  <= 1'b0;
      cp_pinv <= 1'b0;
      unique case (st)
        S_IDLE:
          if (cp_start) begin
            cp_obj    <= PARAM_OBJ;
            cp_addr   <= '0;
            cp_wr     <= 1'b0;
            cp_access <= 1'b1;
            pcnt      <= '0;
            st        <= S_PARAM;
          end
        S_PARAM:
          if (cp_tlbhit) begin
            if (pcnt == 3'd0) n_blk <= cp_din[ADDR_W-1:0];
            else              keyreg <= {keyreg[95:0], cp_din};
            if (pcnt == 3'd4) begin
              cp_access <= 1'b0;
              cp_pinv   <= 1'b1;
              kg_cnt    <= '0;
              st        <= S_KEYGEN;
            end else begin
              pcnt    <= pcnt + 1'b1;
              cp_addr <= ADDR_W'(pcnt + 1'b1);
            end
          end
        S_KEYGEN: begin
          for (int q = 0; q < 8; q++)
            if (8 * kg_cnt + q < 52) sk[8 * kg_cnt + q] <= keyreg[127 - 16 * q -: 16];
          keyreg <= {keyreg[102:0], keyreg[127:103]};
          kg_cnt <= kg_cnt + 1'b1;
          if (kg_cnt == 3'd6) begin
            base <= '0;
            if (n_blk == '0) begin
              st <= S_FIN;
            end else begin
              k         <= '0;
              half      <= 1'b0;
              g_n       <= (n_blk >= ADDR_W'(G)) ? 2'(G) : n_blk[1:0];
              cp_obj    <= OBJ_IN;
              cp_addr   <= '0;
              cp_wr     <= 1'b0;
              cp_access <= 1'b1;
              st        <= S_LOAD;
            end
          end
        end
        S_LOAD:
          if (cp_tlbhit) begin
            if (!half) in_buf[k][63:32] <= cp_din;
            else       in_buf[k][31:0]  <= cp_din;
            half <= ~half;
            if (half && k + 1'b1 == g_n) begin
              cp_access <= 1'b0;
              running   <= 1'b1;
              run_t     <= '0;
              st        <= S_RUN;
            end else begin
              if (half) k <= k + 1'b1;
              cp_addr <= ADDR_W'({base + ADDR_W'(k) + ADDR_W'(half), ~half});
            end
          end
        S_RUN: if (core_tick) begin
          run_t <= run_t + 1'b1;
          if (run_t == 5'(RUN_CYC)) begin
            running   <= 1'b0;
            k         <= '0;
            half      <= 1'b0;
            cp_obj    <= OBJ_OUT;
            cp_addr   <= ADDR_W'({base, 1'b0});
            cp_dout   <= out_buf[0][63:32];
            cp_wr     <= 1'b1;
            cp_access <= 1'b1;
            st        <= S_STORE;
          end
        end
        S_STORE:
          if (cp_tlbhit) begin
            half <= ~half;
            if (half && k + 1'b1 == g_n) begin
              cp_access <= 1'b0;
              cp_wr     <= 1'b0;
              if (base + ADDR_W'(g_n) == n_blk) begin
                st <= S_FIN;
              end else begin
                base      <= base + ADDR_W'(g_n);
                k         <= '0;
                g_n       <= (n_blk - base - ADDR_W'(g_n) >= ADDR_W'(G)) ? 2'(G)
                                                                         : 2'(n_blk - base - ADDR_W'(g_n));
                cp_obj    <= OBJ_IN;
                cp_addr   <= ADDR_W'({base + ADDR_W'(g_n), 1'b0});
                cp_access <= 1'b1;
                st        <= S_LOAD;
              end
            end else begin
              if (half) k <= k + 1'b1;
              cp_addr <= ADDR_W'({base + ADDR_W'(k) + ADDR_W'(half), ~half});
              cp_dout <= half ? out_buf[k + 1'b1][63:32] : out_buf[k][31:0];
            end
          end
        S_FIN: begin
          cp_fin <= 1'b1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
