// tb_imu - self-checking test of the Interface Management Unit.
//
// The testbench drives the coprocessor side and the processor register port
// and models the dual-port RAM as a plain synchronous array. It checks:
//  - CR.START gives a one-cycle CP_START and sets SR.BUSY;
//  - a translated read returns the word of the mapped physical page, with
//    CP_TLBHIT in the fourth cycle (data taken at the fourth rising edge);
//  - a translated write lands at the translated address, takes the same
//    four cycles and sets the entry's dirty bit;
//  - a miss stalls the access (no CP_TLBHIT), sets SR.FAULT, raises
//    INT_PLD, leaves the access in AR; after the TLB is written and
//    CR.RESTART set, the access completes with the right data;
//  - CP_PINV invalidates only the parameter object's entries;
//  - CP_FIN sets SR.DONE and raises INT_PLD, CR.ACK clears it, and the
//    interrupt stays low while CR.IRQ_EN is clear.
module tb_imu;
  import vim_pkg::*;

  logic              clk = 1'b0, rst = 1'b1;
  logic [OBJ_W-1:0]  cp_obj = '0;
  logic [ADDR_W-1:0] cp_addr = '0;
  logic [DATA_W-1:0] cp_dout = '0, cp_din;
  logic              cp_access = 1'b0, cp_wr = 1'b0, cp_tlbhit, cp_start;
  logic              cp_fin = 1'b0, cp_pinv = 1'b0;
  logic [DP_AW-1:0]  dp_addr;
  logic [DATA_W-1:0] dp_din, dp_dout;
  logic              dp_en, dp_wr;
  logic              reg_en = 1'b0, reg_wr = 1'b0;
  logic [REG_AW-1:0] reg_addr = '0;
  logic [31:0]       reg_wdata = '0, reg_rdata;
  logic              int_pld;

  imu dut (.*);

  always #5 clk = ~clk;

  // behavioural dual-port RAM, IMU side only
  logic [DATA_W-1:0] ram [DP_WORDS];
  always_ff @(posedge clk) begin
    if (dp_en) begin
      if (dp_wr) ram[dp_addr] <= dp_dout;
      else       dp_din       <= ram[dp_addr];
    end
  end

  int checks = 0, failures = 0;
  int start_pulses = 0;
  always @(posedge clk) if (cp_start) start_pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reg_write(input logic [REG_AW-1:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_en = 1'b1; reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_en = 1'b0; reg_wr = 1'b0;
  endtask

  task automatic rd(input logic [REG_AW-1:0] a, output logic [31:0] d);
    reg_addr = a;
    #1 d = reg_rdata;
  endtask

  function automatic logic [31:0] entry(input bit v, input int unsigned o,
                                        input int unsigned vpn, input int unsigned ppn);
    tlb_entry_t e;
    e.valid = v; e.dirty = 1'b0; e.obj = OBJ_W'(o); e.vpn = VPN_W'(vpn); e.ppn = PPN_W'(ppn);
    return 32'(e);
  endfunction

  // Present a request at a falling edge and hold it until CP_TLBHIT; returns
  // the number of rising edges up to and including the one that takes the data.
  task automatic access(input int unsigned o, input int unsigned a, input bit w,
                        input logic [31:0] wd, output logic [31:0] rdata, output int edges);
    @(negedge clk);
    cp_obj = OBJ_W'(o); cp_addr = ADDR_W'(a); cp_wr = w; cp_dout = wd; cp_access = 1'b1;
    edges = 0;
    do begin
      @(negedge clk);
      edges++;
    end while (!cp_tlbhit && edges < 1000);
    rdata = cp_din;
    edges++;                 // the rising edge that takes the data
    @(posedge clk);
    #1 cp_access = 1'b0; cp_wr = 1'b0;
  endtask

  initial begin
    logic [31:0] d, sr, r0, r1;
    int edges;
    tlb_entry_t e;
    for (int i = 0; i < DP_WORDS; i++) ram[i] = $urandom;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    rd(REG_SR, r0);
    check(int_pld == 1'b0 && r0 == 32'h0, "idle after reset");

    // mappings: object 2 page 3 -> frame 5, parameter object page 0 -> frame 1,
    // object 6 page 0 -> frame 0
    reg_write(REG_TLB + 0, entry(1, 2, 3, 5));
    reg_write(REG_TLB + 1, entry(1, 32'(PARAM_OBJ), 0, 1));
    reg_write(REG_TLB + 3, entry(1, 6, 0, 0));
    rd(REG_TLB + 1, r0);
    check(r0 == entry(1, 32'(PARAM_OBJ), 0, 1), "TLB entry reads back");

    reg_write(REG_CR, 32'(1 << CR_IRQ_EN) | 32'(1 << CR_START));
    check(start_pulses == 1, "one CP_START pulse");
    rd(REG_SR, r0);
    check(r0[SR_BUSY] == 1'b1, "busy after start");
    rd(REG_CR, r0);
    check(r0[CR_IRQ_EN] == 1'b1, "IRQ_EN stored");

    // read hits, four cycles each
    for (int k = 0; k < 20; k++) begin
      automatic int unsigned off = $urandom % PAGE_WORDS;
      access(2, 3 * PAGE_WORDS + off, 0, 0, d, edges);
      check(d == ram[5 * PAGE_WORDS + off], $sformatf("read obj 2 index %0d", 3 * PAGE_WORDS + off));
      check(edges == 4, $sformatf("read took %0d edges, expected 4", edges));
    end
    access(2, 3 * PAGE_WORDS + 7, 0, 0, d, edges);
    rd(REG_AR, r0);
    check(r0 == 32'({OBJ_W'(2), ADDR_W'(3 * PAGE_WORDS + 7)}), "AR holds last access");

    // write hit
    access(6, 100, 1, 32'hCAFE_F00D, d, edges);
    check(edges == 4, "write takes four cycles");
    check(ram[100] == 32'hCAFE_F00D, "write lands in frame 0");
    rd(REG_TLB + 3, r0);
    e = tlb_entry_t'(r0[TLB_ENTRY_W-1:0]);
    check(e.dirty == 1'b1, "write sets the dirty bit");
    rd(REG_TLB + 0, r0);
    e = tlb_entry_t'(r0[TLB_ENTRY_W-1:0]);
    check(e.dirty == 1'b0, "reads leave the dirty bit clear");
    rd(REG_SR, r0);
    check(r0[SR_WRITE] == 1'b1, "SR shows a write");

    // miss: object 4 index 600 (page 1) is not mapped
    fork
      begin
        access(4, 600, 0, 0, d, edges);
      end
      begin
        repeat (30) @(negedge clk);
        rd(REG_SR, r0);
        sr = r0;
        check(sr[SR_FAULT] == 1'b1, "miss sets FAULT");
        check(int_pld == 1'b1, "miss raises INT_PLD");
        check(cp_tlbhit == 1'b0, "stalled access has no TLBHIT");
        rd(REG_AR, r0);
        check(r0 == 32'({OBJ_W'(4), ADDR_W'(600)}), "AR holds the faulting access");
        ram[7 * PAGE_WORDS + 600 - PAGE_WORDS] = 32'h1234_5678;
        reg_write(REG_TLB + 2, entry(1, 4, 1, 7));
        reg_write(REG_CR, 32'(1 << CR_IRQ_EN) | 32'(1 << CR_RESTART));
      end
    join
    check(d == 32'h1234_5678, "restarted access reads the new page");
    check(edges > 30, "access stalled until restart");
    rd(REG_SR, r0);
    check(r0[SR_FAULT] == 1'b0 && int_pld == 1'b0, "restart clears FAULT");

    // parameter page release
    @(negedge clk) cp_pinv = 1'b1;
    @(negedge clk) cp_pinv = 1'b0;
    rd(REG_TLB + 1, r0);
    check(r0[TLB_ENTRY_W-1] == 1'b0, "CP_PINV invalidates the parameter page");
    rd(REG_TLB + 0, r0);
    check(r0[TLB_ENTRY_W-1] == 1'b1, "CP_PINV leaves data pages");
    access(2, 3 * PAGE_WORDS, 0, 0, d, edges);
    check(d == ram[5 * PAGE_WORDS] && edges == 4, "data page still translates");

    // end of operation
    @(negedge clk) cp_fin = 1'b1;
    @(negedge clk) cp_fin = 1'b0;
    rd(REG_SR, r0);
    sr = r0;
    check(sr[SR_DONE] == 1'b1 && sr[SR_BUSY] == 1'b0, "CP_FIN sets DONE, clears BUSY");
    check(int_pld == 1'b1, "DONE raises INT_PLD");
    reg_write(REG_CR, 32'(1 << CR_IRQ_EN) | 32'(1 << CR_ACK));
    rd(REG_SR, r0);
    check(r0[SR_DONE] == 1'b0 && int_pld == 1'b0, "ACK clears DONE");

    // interrupt masked
    reg_write(REG_CR, 32'(1 << CR_START));
    @(negedge clk) cp_fin = 1'b1;
    @(negedge clk) cp_fin = 1'b0;
    rd(REG_SR, r0);
    check(r0[SR_DONE] == 1'b1 && int_pld == 1'b0, "INT_PLD masked without IRQ_EN");
    check(start_pulses == 2, "second CP_START pulse");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
