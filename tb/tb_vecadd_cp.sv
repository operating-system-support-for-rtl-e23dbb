// tb_vecadd_cp - self-checking test of the vector-addition coprocessor.
//
// The coprocessor runs against a behavioural interface (cp_mem_model). Run
// 1 has no stalls: the results C[i] = A[i] + B[i], the request count
// (1 + 3n), a single CP_PINV and CP_FIN, and the run time of four cycles per
// request are checked. Run 2 uses random long stalls and a different length
// and checks the results again. Run 3 passes a length of zero.
module tb_vecadd_cp;
  import vim_pkg::*;

  logic              clk = 1'b0, rst = 1'b1, stall_en = 1'b0;
  logic              cp_start = 1'b0;
  logic [OBJ_W-1:0]  cp_obj;
  logic [ADDR_W-1:0] cp_addr;
  logic [DATA_W-1:0] cp_dout, cp_din;
  logic              cp_access, cp_wr, cp_tlbhit, cp_fin, cp_pinv;

  vecadd_cp dut (.*);
  cp_mem_model u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fin = 0, n_pinv = 0;
  always @(posedge clk) begin
    if (cp_fin)  n_fin++;
    if (cp_pinv) n_pinv++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic run(input int unsigned n, input bit stalls);
    int cycles = 0;
    int req0 = u_mem.n_req, fin0 = n_fin, pinv0 = n_pinv;
    logic [31:0] a [], b [];
    a = new[n]; b = new[n];
    stall_en = stalls;
    u_mem.mem[key(32'(PARAM_OBJ), 0)] = 32'(n);
    for (int unsigned i = 0; i < n; i++) begin
      a[i] = $urandom; b[i] = $urandom;
      u_mem.mem[key(0, i)] = a[i];
      u_mem.mem[key(1, i)] = b[i];
      u_mem.mem[key(2, i)] = 32'hFFFF_FFFF;
    end
    @(negedge clk) cp_start = 1'b1;
    @(negedge clk) cp_start = 1'b0;
    while (n_fin == fin0 && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    for (int unsigned i = 0; i < n; i++)
      check(u_mem.mem[key(2, i)] == a[i] + b[i], $sformatf("n=%0d C[%0d]", n, i));
    check(u_mem.n_req - req0 == 1 + 3 * n, $sformatf("n=%0d requests %0d", n, u_mem.n_req - req0));
    check(n_pinv - pinv0 == 1, "one parameter-page release");
    check(n_fin - fin0 == 1, "one CP_FIN");
    if (!stalls && n > 0)
      // 4 cycles per request, the cycle that raises CP_FIN and the one that counts it
      check(cycles == 4 * (1 + 3 * n) + 2, $sformatf("n=%0d took %0d cycles, expected %0d",
            n, cycles, 4 * (1 + 3 * n) + 2));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run(37, 1'b0);
    run(200, 1'b1);
    check(u_mem.n_stalled > 0, "stalls occurred");
    run(0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
