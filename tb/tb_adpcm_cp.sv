// tb_adpcm_cp - self-checking test of the ADPCM decoding coprocessor.
//
// Runs against a behavioural interface (cp_mem_model). First a hand-worked
// case: the single input word 0x00000070 (codes 7, 0, 0, 0, 0, 0, 0, 0)
// decodes to 11, 13, 14, 15, 16, 17, 18, 19. Then random input, decoded
// here by a separate reference model, without and with random stalls, and
// a run long enough to drive the step index to both clamps and the sample
// to saturation. Also checked: one request per input word plus four per
// output group (1 + 5n in all), one CP_PINV and one CP_FIN per run, and
// the run time without stalls (per input word: 4 + 4 x (2 + 4) cycles).
module tb_adpcm_cp;
  import vim_pkg::*;

  logic              clk = 1'b0, rst = 1'b1, stall_en = 1'b0;
  logic              cp_start = 1'b0;
  logic [OBJ_W-1:0]  cp_obj;
  logic [ADDR_W-1:0] cp_addr;
  logic [DATA_W-1:0] cp_dout, cp_din;
  logic              cp_access, cp_wr, cp_tlbhit, cp_fin, cp_pinv;

  adpcm_cp dut (.*);
  cp_mem_model u_mem (.*);

  always #5 clk = ~clk;

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

  localparam int STEPS [89] = '{
        7,     8,     9,    10,    11,    12,    13,    14,    16,    17,
       19,    21,    23,    25,    28,    31,    34,    37,    41,    45,
       50,    55,    60,    66,    73,    80,    88,    97,   107,   118,
      130,   143,   157,   173,   190,   209,   230,   253,   279,   307,
      337,   371,   408,   449,   494,   544,   598,   658,   724,   796,
      876,   963,  1060,  1166,  1282,  1411,  1552,  1707,  1878,  2066,
     2272,  2499,  2749,  3024,  3327,  3660,  4026,  4428,  4871,  5358,
     5894,  6484,  7132,  7845,  8630,  9493, 10442, 11487, 12635, 13899,
    15289, 16818, 18500, 20350, 22385, 24623, 27086, 29794, 32767};
  localparam int ADJ [8] = '{-1, -1, -1, -1, 2, 4, 6, 8};

  int n_clamp_hi = 0, n_sat = 0;

  // reference decoder: returns the expected output words
  task automatic ref_decode(input logic [31:0] in [], output logic [31:0] out []);
    int valpred = 0, index = 0;
    int s [$];
    s = {};
    foreach (in[w]) begin
      for (int j = 0; j < 8; j++) begin
        int code = (j % 2 == 0) ? int'(in[w][8*(j/2)+4 +: 4]) : int'(in[w][8*(j/2) +: 4]);
        int step = STEPS[index];
        int vpdiff = step / 8;
        if ((code & 4) != 0) vpdiff += step;
        if ((code & 2) != 0) vpdiff += step / 2;
        if ((code & 1) != 0) vpdiff += step / 4;
        valpred = ((code & 8) != 0) ? valpred - vpdiff : valpred + vpdiff;
        if (valpred > 32767)  begin valpred = 32767;  n_sat++; end
        if (valpred < -32768) begin valpred = -32768; n_sat++; end
        index += ADJ[code & 7];
        if (index < 0) index = 0;
        if (index > 88) begin index = 88; n_clamp_hi++; end
        s.push_back(valpred);
      end
    end
    out = new[in.size() * 4];
    foreach (out[o]) out[o] = {16'(s[2*o+1]), 16'(s[2*o])};
  endtask

  task automatic run(input logic [31:0] in [], input bit stalls, output logic [31:0] got []);
    int cycles = 0;
    int req0 = u_mem.n_req, fin0 = n_fin, pinv0 = n_pinv;
    int unsigned n = in.size();
    stall_en = stalls;
    u_mem.mem[key(32'(PARAM_OBJ), 0)] = 32'(n);
    foreach (in[i]) u_mem.mem[key(0, i)] = in[i];
    @(negedge clk) cp_start = 1'b1;
    @(negedge clk) cp_start = 1'b0;
    while (n_fin == fin0 && cycles < 400000) begin
      @(negedge clk);
      cycles++;
    end
    got = new[n * 4];
    foreach (got[o]) got[o] = u_mem.mem.exists(key(1, o)) ? u_mem.mem[key(1, o)] : 32'hX;
    check(u_mem.n_req - req0 == 1 + 5 * n, $sformatf("n=%0d requests %0d", n, u_mem.n_req - req0));
    check(n_pinv - pinv0 == 1, "one parameter-page release");
    check(n_fin - fin0 == 1, "one CP_FIN");
    if (!stalls)
      check(cycles == 4 + n * 28 + 2, $sformatf("n=%0d took %0d cycles, expected %0d", n, cycles, 4 + n * 28 + 2));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    logic [31:0] in [], exp [], got [];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // hand-worked case
    in = new[1];
    in[0] = 32'h0000_0070;
    run(in, 1'b0, got);
    check(got[0] == 32'h000D_000B, $sformatf("word 0 %h", got[0]));
    check(got[1] == 32'h000F_000E, $sformatf("word 1 %h", got[1]));
    check(got[2] == 32'h0011_0010, $sformatf("word 2 %h", got[2]));
    check(got[3] == 32'h0013_0012, $sformatf("word 3 %h", got[3]));

    // random input, no stalls and with stalls
    for (int r = 0; r < 2; r++) begin
      in = new[64];
      foreach (in[i]) in[i] = $urandom;
      ref_decode(in, exp);
      run(in, r == 1, got);
      foreach (exp[o]) check(got[o] == exp[o], $sformatf("run %0d out[%0d] %h expected %h", r, o, got[o], exp[o]));
    end
    check(u_mem.n_stalled > 0, "stalls occurred");

    // large positive codes drive the index to 88 and the sample to saturation
    in = new[16];
    foreach (in[i]) in[i] = (i < 8) ? 32'h7777_7777 : 32'hFFFF_FFFF;
    n_clamp_hi = 0; n_sat = 0;
    ref_decode(in, exp);
    run(in, 1'b0, got);
    foreach (exp[o]) check(got[o] == exp[o], $sformatf("clamp run out[%0d] %h expected %h", o, got[o], exp[o]));
    check(n_clamp_hi > 0 && n_sat > 0, "index clamp and saturation exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
