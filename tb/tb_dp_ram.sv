// tb_dp_ram - self-checking test of the dual-port interface RAM.
//
// Writes random data through both ports into random words (each port its
// own half, then crossing over), reads every written word back through both
// ports, and checks the one-cycle read latency, that read data hold while a
// port is idle, and that a write does not disturb the port's read output.
module tb_dp_ram;
  import vim_pkg::*;

  localparam int unsigned W  = DP_WORDS;
  localparam int unsigned AW = $clog2(W);

  logic              clk = 1'b0;
  logic              a_en = 1'b0, a_wr = 1'b0, b_en = 1'b0, b_wr = 1'b0;
  logic [AW-1:0]     a_addr = '0, b_addr = '0;
  logic [DATA_W-1:0] a_din = '0, b_din = '0, a_dout, b_dout;

  dp_ram dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] model [int unsigned];

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

  initial begin
    int unsigned addrs [$];
    logic [DATA_W-1:0] held;
    repeat (2) @(negedge clk);

    // write 400 random words, port A in the lower half, port B in the upper
    for (int k = 0; k < 200; k++) begin
      automatic int unsigned aa = $urandom % (W / 2);
      automatic int unsigned ba = W / 2 + $urandom % (W / 2);
      a_en = 1; a_wr = 1; a_addr = AW'(aa); a_din = $urandom;
      b_en = 1; b_wr = 1; b_addr = AW'(ba); b_din = $urandom;
      model[aa] = a_din; model[ba] = b_din;
      addrs.push_back(aa); addrs.push_back(ba);
      @(negedge clk);
    end
    a_en = 0; b_en = 0; a_wr = 0; b_wr = 0;

    // read back: port A reads what B wrote and the other way round
    foreach (addrs[k]) begin
      a_en = 1; a_addr = AW'(addrs[k]);
      b_en = 1; b_addr = AW'(addrs[addrs.size() - 1 - k]);
      @(negedge clk);
      check(a_dout == model[addrs[k]], $sformatf("port A read %0d", addrs[k]));
      check(b_dout == model[addrs[addrs.size() - 1 - k]], $sformatf("port B read %0d", addrs[addrs.size() - 1 - k]));
    end

    // read data hold while idle; a write leaves the read output alone
    a_en = 1; a_addr = AW'(addrs[0]);
    @(negedge clk);
    held = a_dout;
    a_en = 0; a_addr = AW'(addrs[1]);
    @(negedge clk);
    check(a_dout == held, "port A output holds while idle");
    a_en = 1; a_wr = 1; a_addr = AW'(addrs[1]); a_din = ~model[addrs[1]];
    model[addrs[1]] = a_din;
    @(negedge clk);
    a_en = 0; a_wr = 0;
    check(a_dout == held, "port A output unchanged by a write");
    b_en = 1; b_addr = AW'(addrs[1]);
    @(negedge clk);
    b_en = 0;
    check(b_dout == model[addrs[1]], "port B sees port A's write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
