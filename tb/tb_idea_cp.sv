// tb_idea_cp - self-checking test of the IDEA encryption coprocessor.
//
// Runs against a behavioural interface (cp_mem_model). Checks the
// published IDEA test vector (key 0001 0002 ... 0008, plaintext
// 0000 0001 0002 0003, ciphertext 11FB ED2B 0198 6DE5), then random keys
// and blocks against a reference model written here (multiplication by
// the % operator on wide integers, key schedule by rotating a 128-bit
// word), for block counts that fill the three-block groups fully and
// partly, with and without random stalls. Also checked: the request count
// (5 parameter words plus two reads and two writes per block), one CP_PINV
// and one CP_FIN per run, the run time without stalls (a group of three
// blocks spends 27 core steps in the three-stage ring, one step every four
// clocks), and that a zero block count does nothing.
module tb_idea_cp;
  import vim_pkg::*;

  logic              clk = 1'b0, rst = 1'b1, stall_en = 1'b0;
  logic              cp_start = 1'b0;
  logic [OBJ_W-1:0]  cp_obj;
  logic [ADDR_W-1:0] cp_addr;
  logic [DATA_W-1:0] cp_dout, cp_din;
  logic              cp_access, cp_wr, cp_tlbhit, cp_fin, cp_pinv;

  idea_cp dut (.*);
  cp_mem_model u_mem (.*);

  always #5 clk = ~clk;

  localparam int DIV = 4;      // the coprocessor's default core step

  int checks = 0, failures = 0;
  int n_fin = 0, n_pinv = 0;
  always @(posedge clk) begin
    if (cp_fin)  n_fin++;
    if (cp_pinv) n_pinv++;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned key(input int unsigned o, input int unsigned a);
    return (o << ADDR_W) | a;
  endfunction

  // ---------------- reference ----------------
  function automatic logic [15:0] rmul(input logic [15:0] x, input logic [15:0] y);
    longint unsigned xx = (x == 0) ? 64'd65536 : 64'(x);
    longint unsigned yy = (y == 0) ? 64'd65536 : 64'(y);
    longint unsigned r = (xx * yy) % 65537;
    return 16'(r);           // 65536 becomes 0
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [127:0] k, input logic [63:0] p);
    logic [15:0] z [52];
    logic [127:0] kk = k;
    logic [15:0] x1, x2, x3, x4, t1, t2;
    for (int q = 0; q < 52; q++) begin
      if (q > 0 && q % 8 == 0) kk = (kk << 25) | (kk >> 103);
      z[q] = kk[127 - 16 * (q % 8) -: 16];
    end
    {x1, x2, x3, x4} = p;
    for (int r = 0; r < 8; r++) begin
      x1 = rmul(x1, z[6*r]);
      x2 = x2 + z[6*r+1];
      x3 = x3 + z[6*r+2];
      x4 = rmul(x4, z[6*r+3]);
      t1 = rmul(x1 ^ x3, z[6*r+4]);
      t2 = rmul(16'((x2 ^ x4) + t1), z[6*r+5]);
      t1 = t1 + t2;
      x1 = x1 ^ t2;
      x4 = x4 ^ t1;
      t1 = t1 ^ x2;            // the middle words change places
      x2 = x3 ^ t2;
      x3 = t1;
    end
    // the output transformation undoes the swap of the last round
    return {rmul(x1, z[48]), 16'(x3 + z[49]), 16'(x2 + z[50]), rmul(x4, z[51])};
  endfunction

  task automatic run(input logic [127:0] k, input logic [63:0] pt [], input bit stalls,
                     output logic [63:0] ct []);
    int cycles = 0;
    int req0 = u_mem.n_req, fin0 = n_fin, pinv0 = n_pinv;
    int unsigned n = pt.size();
    stall_en = stalls;
    u_mem.mem[key(32'(PARAM_OBJ), 0)] = 32'(n);
    for (int q = 0; q < 4; q++) u_mem.mem[key(32'(PARAM_OBJ), q + 1)] = k[127 - 32 * q -: 32];
    foreach (pt[b]) begin
      u_mem.mem[key(0, 2 * b)]     = pt[b][63:32];
      u_mem.mem[key(0, 2 * b + 1)] = pt[b][31:0];
      u_mem.mem[key(1, 2 * b)]     = 32'h0;
      u_mem.mem[key(1, 2 * b + 1)] = 32'h0;
    end
    @(negedge clk) cp_start = 1'b1;
    @(negedge clk) cp_start = 1'b0;
    while (n_fin == fin0 && cycles < 400000) begin
      @(negedge clk);
      cycles++;
    end
    ct = new[n];
    foreach (ct[b]) ct[b] = {u_mem.mem[key(1, 2 * b)], u_mem.mem[key(1, 2 * b + 1)]};
    check(u_mem.n_req - req0 == 5 + 4 * n, $sformatf("n=%0d requests %0d", n, u_mem.n_req - req0));
    check(n_pinv - pinv0 == 1, "one parameter-page release");
    check(n_fin - fin0 == 1, "one CP_FIN");
    // without stalls: 5 parameter reads, 7 key-schedule cycles, per group of
    // g blocks 2g reads, 27 ring steps of DIV cycles and 2g writes, four
    // cycles per access
    if (!stalls && n > 0)
      check(cycles == 29 + 16 * n + 27 * DIV * ((n + 2) / 3),
            $sformatf("n=%0d took %0d cycles, expected %0d", n, cycles, 29 + 16 * n + 27 * DIV * ((n + 2) / 3)));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    logic [63:0] pt [], ct [];
    logic [127:0] k;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // published test vector, also checks the reference
    k = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
    check(ref_encrypt(k, 64'h0000_0001_0002_0003) == 64'h11FB_ED2B_0198_6DE5, "reference model vector");
    pt = new[1];
    pt[0] = 64'h0000_0001_0002_0003;
    run(k, pt, 1'b0, ct);
    check(ct[0] == 64'h11FB_ED2B_0198_6DE5, $sformatf("test vector gives %h", ct[0]));

    // random keys and data, groups full and partial
    for (int r = 0; r < 6; r++) begin
      logic [63:0] exp;
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = new[1 + r * 2];
      foreach (pt[b]) pt[b] = {$urandom, $urandom};
      if (r == 2) pt[0] = 64'h0;     // zero words exercise the 2^16 case
      run(k, pt, r >= 3, ct);
      foreach (pt[b]) begin
        exp = ref_encrypt(k, pt[b]);
        check(ct[b] == exp, $sformatf("run %0d block %0d: %h expected %h", r, b, ct[b], exp));
      end
    end
    check(u_mem.n_stalled > 0, "stalls occurred");

    // no blocks
    pt = new[0];
    run(k, pt, 1'b0, ct);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
