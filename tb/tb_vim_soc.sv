// tb_vim_soc - end-to-end test of the virtualised coprocessor interface at
// full size (16 KB dual-port RAM, eight 2 KB pages, eight TLB entries).
//
// The testbench plays the processor and its operating system. It holds the
// user-space data of every object in its own memory and contains a
// behavioural interface manager:
//   execute  - clears the TLB, writes the parameters to a page mapped as the
//              parameter object, preloads as many pages of the mapped objects
//              as fit, enables the interrupt and starts the coprocessor;
//   fault    - on INT_PLD with SR.FAULT, reads AR, takes a free page (one
//              whose TLB entry is invalid) or evicts the oldest one (FIFO),
//              copies a dirty victim back to user memory, copies the missing
//              page in, writes the TLB entry and sets CR.RESTART;
//   done     - on INT_PLD with SR.DONE, copies every dirty page back and
//              acknowledges.
// Runs: vector addition that fits (no fault; cycle count checked against
// four cycles per access), vector addition of three 6 KB vectors (faults and
// dirty evictions), ADPCM decoding of 2 KB of input (fits, no fault, as in
// the described measurements) and of 4 KB and 8 KB of input (faults), IDEA
// encryption of 4 KB (fits) and of 8, 16 and 32 KB (faults). Results are
// compared with values computed here. Every mechanism (translation hit,
// page fault stall, eviction, dirty write-back, release of the parameter
// page, end-of-operation interrupt) is counted and must occur.
module tb_vim_soc;
  import vim_pkg::*;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic [1:0]        cp_sel = '0;
  logic              reg_en = 1'b0, reg_wr = 1'b0;
  logic [REG_AW-1:0] reg_addr = '0;
  logic [31:0]       reg_wdata = '0, reg_rdata;
  logic              int_pld;
  logic              cpu_dp_en = 1'b0, cpu_dp_wr = 1'b0;
  logic [DP_AW-1:0]  cpu_dp_addr = '0;
  logic [DATA_W-1:0] cpu_dp_din = '0, cpu_dp_dout;

  vim_soc u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_hits = 0, n_faults = 0, n_stall_cycles = 0, n_evict = 0, n_writeback = 0;
  int n_pinv = 0, n_done_irq = 0, n_preload = 0;
  always @(posedge clk) if (!rst) begin
    if (u_dut.cp_tlbhit) n_hits++;
    if (u_dut.cp_access && u_dut.u_imu.state == IMU_FAULT) n_stall_cycles++;
    if (u_dut.cp_pinv) n_pinv++;
  end

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- processor bus ----------------
  task automatic reg_write(input logic [REG_AW-1:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_en = 1'b1; reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_en = 1'b0; reg_wr = 1'b0;
  endtask

  task automatic reg_read(input logic [REG_AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr = a;
    #1 d = reg_rdata;
  endtask

  task automatic dp_write(input int unsigned a, input logic [31:0] d);
    @(negedge clk);
    cpu_dp_en = 1'b1; cpu_dp_wr = 1'b1; cpu_dp_addr = DP_AW'(a); cpu_dp_din = d;
    @(negedge clk);
    cpu_dp_en = 1'b0; cpu_dp_wr = 1'b0;
  endtask

  task automatic dp_read(input int unsigned a, output logic [31:0] d);
    @(negedge clk);
    cpu_dp_en = 1'b1; cpu_dp_wr = 1'b0; cpu_dp_addr = DP_AW'(a);
    @(negedge clk);
    cpu_dp_en = 1'b0;
    d = cpu_dp_dout;
  endtask

  // ---------------- user space and interface manager ----------------
  logic [31:0] umem [int unsigned];            // key: obj * 2^20 + index
  int unsigned obj_words [16];
  bit          obj_mapped [16];
  bit          frame_used [N_PAGES];
  int unsigned frame_obj  [N_PAGES];
  int unsigned frame_vpn  [N_PAGES];
  int unsigned fifo_ptr;

  function automatic int unsigned key(input int unsigned obj, input int unsigned idx);
    return (obj << ADDR_W) | idx;
  endfunction

  function automatic logic [31:0] tlb_word(input bit v, input int unsigned obj,
                                           input int unsigned vpn, input int unsigned ppn);
    tlb_entry_t e;
    e.valid = v; e.dirty = 1'b0;
    e.obj = OBJ_W'(obj); e.vpn = VPN_W'(vpn); e.ppn = PPN_W'(ppn);
    return 32'(e);
  endfunction

  task automatic copy_out(input int unsigned f);
    logic [31:0] d;
    for (int unsigned w = 0; w < PAGE_WORDS; w++) begin
      int unsigned idx = frame_vpn[f] * PAGE_WORDS + w;
      if (idx < obj_words[frame_obj[f]]) begin
        dp_read(f * PAGE_WORDS + w, d);
        umem[key(frame_obj[f], idx)] = d;
      end
    end
  endtask

  task automatic copy_in(input int unsigned f, input int unsigned obj, input int unsigned vpn);
    for (int unsigned w = 0; w < PAGE_WORDS; w++) begin
      int unsigned idx = vpn * PAGE_WORDS + w;
      if (idx < obj_words[obj])
        dp_write(f * PAGE_WORDS + w, umem.exists(key(obj, idx)) ? umem[key(obj, idx)] : 32'h0);
    end
  endtask

  // Choose a page frame: a free one, or one whose TLB entry the coprocessor
  // invalidated, else the oldest (FIFO).
  task automatic pick_frame(output int unsigned f);
    logic [31:0] r;
    tlb_entry_t  e;
    for (int unsigned i = 0; i < N_PAGES; i++) begin
      if (!frame_used[i]) begin f = i; return; end
    end
    for (int unsigned i = 0; i < N_PAGES; i++) begin
      reg_read(REG_TLB + REG_AW'(i), r);
      e = tlb_entry_t'(r[TLB_ENTRY_W-1:0]);
      if (!e.valid) begin f = i; return; end
    end
    f = fifo_ptr;
    fifo_ptr = (fifo_ptr + 1) % N_PAGES;
    reg_read(REG_TLB + REG_AW'(f), r);
    e = tlb_entry_t'(r[TLB_ENTRY_W-1:0]);
    n_evict++;
    if (e.dirty) begin
      n_writeback++;
      copy_out(f);
    end
  endtask

  task automatic map_page(input int unsigned obj, input int unsigned vpn);
    int unsigned f;
    pick_frame(f);
    copy_in(f, obj, vpn);
    frame_used[f] = 1'b1;
    frame_obj[f]  = obj;
    frame_vpn[f]  = vpn;
    reg_write(REG_TLB + REG_AW'(f), tlb_word(1'b1, obj, vpn, f));
  endtask

  // FPGA_EXECUTE followed by interrupt service until end of operation.
  // Returns the number of cycles the coprocessor was busy.
  task automatic execute(input logic [31:0] param0, output longint busy_cycles);
    logic [31:0] sr, ar, r;
    longint t0;
    int unsigned nfree;
    tlb_entry_t e;
    for (int unsigned i = 0; i < N_PAGES; i++) begin
      frame_used[i] = 1'b0;
      reg_write(REG_TLB + REG_AW'(i), 32'h0);
    end
    fifo_ptr = 0;
    // parameter page
    if (obj_words[PARAM_OBJ] == 0) obj_words[PARAM_OBJ] = 1;
    umem[key(32'(PARAM_OBJ), 0)] = param0;
    map_page(32'(PARAM_OBJ), 0);
    // preload what fits
    nfree = N_PAGES - 1;
    for (int unsigned o = 0; o < 15; o++) begin
      if (obj_mapped[o]) begin
        for (int unsigned v = 0; v * PAGE_WORDS < obj_words[o] && nfree > 0; v++) begin
          map_page(o, v);
          n_preload++;
          nfree--;
        end
      end
    end
    reg_write(REG_CR, 32'(1 << CR_IRQ_EN) | 32'(1 << CR_START));
    t0 = cycle;
    forever begin
      @(negedge clk);
      if (int_pld) begin
        reg_read(REG_SR, sr);
        if (sr[SR_FAULT]) begin
          n_faults++;
          reg_read(REG_AR, ar);
          map_page(32'(ar[OBJ_W+ADDR_W-1:ADDR_W]), 32'(ar[ADDR_W-1:OFF_W]));
          reg_write(REG_CR, 32'(1 << CR_IRQ_EN) | 32'(1 << CR_RESTART));
        end else if (sr[SR_DONE]) begin
          n_done_irq++;
          busy_cycles = cycle - t0;
          for (int unsigned i = 0; i < N_PAGES; i++) begin
            reg_read(REG_TLB + REG_AW'(i), r);
            e = tlb_entry_t'(r[TLB_ENTRY_W-1:0]);
            if (e.valid && e.dirty) copy_out(i);
            reg_write(REG_TLB + REG_AW'(i), 32'h0);
          end
          reg_write(REG_CR, 32'(1 << CR_IRQ_EN) | 32'(1 << CR_ACK));
          break;
        end
      end
    end
  endtask

  // ---------------- reference ADPCM decoder ----------------
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

  task automatic ref_adpcm(input int unsigned nin);
    int valpred = 0, index = 0;
    int samples [$];
    samples = {};
    for (int unsigned w = 0; w < nin; w++) begin
      logic [31:0] iw = umem[key(0, w)];
      for (int j = 0; j < 8; j++) begin
        int code = (j % 2 == 0) ? int'(iw[8*(j/2)+4 +: 4]) : int'(iw[8*(j/2) +: 4]);
        int step = STEPS[index];
        int vpdiff = step / 8;
        if ((code & 4) != 0) vpdiff += step;
        if ((code & 2) != 0) vpdiff += step / 2;
        if ((code & 1) != 0) vpdiff += step / 4;
        valpred = ((code & 8) != 0) ? valpred - vpdiff : valpred + vpdiff;
        if (valpred > 32767) valpred = 32767;
        if (valpred < -32768) valpred = -32768;
        index += ADJ[code & 7];
        if (index < 0) index = 0;
        if (index > 88) index = 88;
        samples.push_back(valpred);
      end
    end
    for (int unsigned o = 0; o < nin * 4; o++)
      umem[key(3, o)] = {16'(samples[2*o+1]), 16'(samples[2*o])};
  endtask

  // ---------------- reference IDEA ----------------
  function automatic logic [15:0] rmul(input logic [15:0] x, input logic [15:0] y);
    longint unsigned xx = (x == 0) ? 64'd65536 : 64'(x);
    longint unsigned yy = (y == 0) ? 64'd65536 : 64'(y);
    return 16'((xx * yy) % 65537);
  endfunction

  function automatic logic [63:0] ref_idea(input logic [127:0] k, input logic [63:0] p);
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
      t1 = t1 ^ x2;
      x2 = x3 ^ t2;
      x3 = t1;
    end
    return {rmul(x1, z[48]), 16'(x3 + z[49]), 16'(x2 + z[50]), rmul(x4, z[51])};
  endfunction

  // ---------------- runs ----------------
  task automatic run_vecadd(input int unsigned n, input bit expect_faults);
    longint bc;
    int f0;
    for (int o = 0; o < 16; o++) begin obj_mapped[o] = 0; obj_words[o] = 0; end
    obj_mapped[0] = 1; obj_mapped[1] = 1; obj_mapped[2] = 1;
    obj_words[0] = n; obj_words[1] = n; obj_words[2] = n;
    for (int unsigned i = 0; i < n; i++) begin
      umem[key(0, i)] = $urandom;
      umem[key(1, i)] = $urandom;
      umem[key(2, i)] = 32'hDEAD_BEEF;
    end
    cp_sel = 2'd0;
    f0 = n_faults;
    execute(32'(n), bc);
    for (int unsigned i = 0; i < n; i++)
      check(umem[key(2, i)] == umem[key(0, i)] + umem[key(1, i)],
            $sformatf("vecadd n=%0d C[%0d]", n, i));
    if (expect_faults) begin
      check(n_faults > f0, $sformatf("vecadd n=%0d should fault", n));
    end else begin
      check(n_faults == f0, $sformatf("vecadd n=%0d should not fault", n));
      // 1 parameter read + 3 accesses per element, 4 cycles each, then
      // CP_FIN and DONE: the busy time is 4 * (1 + 3n) + 3 cycles.
      check(bc == 4 * (1 + 3 * n) + 3,
            $sformatf("vecadd n=%0d busy %0d cycles, expected %0d", n, bc, 4 * (1 + 3 * n) + 3));
    end
  endtask

  task automatic run_adpcm(input int unsigned nin, input bit expect_faults);
    longint bc;
    int f0;
    for (int o = 0; o < 16; o++) begin obj_mapped[o] = 0; obj_words[o] = 0; end
    obj_mapped[0] = 1; obj_mapped[1] = 1;
    obj_words[0] = nin; obj_words[1] = nin * 4;
    for (int unsigned i = 0; i < nin; i++) umem[key(0, i)] = $urandom;
    for (int unsigned i = 0; i < nin * 4; i++) umem[key(1, i)] = 32'h0;
    ref_adpcm(nin);
    cp_sel = 2'd1;
    f0 = n_faults;
    execute(32'(nin), bc);
    for (int unsigned i = 0; i < nin * 4; i++)
      check(umem[key(1, i)] == umem[key(3, i)],
            $sformatf("adpcm nin=%0d out[%0d] %h expected %h", nin, i, umem[key(1, i)], umem[key(3, i)]));
    if (expect_faults) check(n_faults > f0, $sformatf("adpcm nin=%0d should fault", nin));
    else               check(n_faults == f0, $sformatf("adpcm nin=%0d should not fault", nin));
  endtask

  // IDEA over nbytes of plaintext (8-byte blocks); the key travels in the
  // parameter page after the block count
  task automatic run_idea(input int unsigned nbytes, input bit expect_faults);
    longint bc;
    int f0;
    int unsigned nblk = nbytes / 8;
    logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
    logic [63:0] exp;
    for (int o = 0; o < 16; o++) begin obj_mapped[o] = 0; obj_words[o] = 0; end
    obj_mapped[0] = 1; obj_mapped[1] = 1;
    obj_words[0] = 2 * nblk; obj_words[1] = 2 * nblk;
    for (int unsigned i = 0; i < 2 * nblk; i++) begin
      umem[key(0, i)] = $urandom;
      umem[key(1, i)] = 32'h0;
    end
    for (int q = 0; q < 4; q++) umem[key(32'(PARAM_OBJ), q + 1)] = k[127 - 32 * q -: 32];
    obj_words[PARAM_OBJ] = 5;
    cp_sel = 2'd2;
    f0 = n_faults;
    execute(32'(nblk), bc);
    for (int unsigned b = 0; b < nblk; b++) begin
      exp = ref_idea(k, {umem[key(0, 2 * b)], umem[key(0, 2 * b + 1)]});
      check({umem[key(1, 2 * b)], umem[key(1, 2 * b + 1)]} == exp,
            $sformatf("idea %0d bytes block %0d", nbytes, b));
    end
    if (expect_faults) check(n_faults > f0, $sformatf("idea %0d bytes should fault", nbytes));
    else               check(n_faults == f0, $sformatf("idea %0d bytes should not fault", nbytes));
  endtask

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    run_vecadd(100, 1'b0);
    run_vecadd(1536, 1'b1);          // 3 x 6 KB: more than the 16 KB RAM
    run_adpcm(512, 1'b0);            // 2 KB in, 8 KB out: fits
    run_adpcm(1024, 1'b1);           // 4 KB in, 16 KB out: page faults
    run_adpcm(2048, 1'b1);           // 8 KB in, 32 KB out: page faults
    run_idea(4096, 1'b0);            // 4 KB in, 4 KB out: fits
    run_idea(8192, 1'b1);            // 8 KB + 8 KB: page faults
    run_idea(16384, 1'b1);
    run_idea(32768, 1'b1);

    $display("hits=%0d faults=%0d stall_cycles=%0d evictions=%0d writebacks=%0d param_releases=%0d done_irqs=%0d preloads=%0d",
             n_hits, n_faults, n_stall_cycles, n_evict, n_writeback, n_pinv, n_done_irq, n_preload);
    check(n_hits > 0, "translation hits occurred");
    check(n_faults > 0, "page faults occurred");
    check(n_stall_cycles > 0, "coprocessor stalled on a miss");
    check(n_evict > 0, "pages were evicted");
    check(n_writeback > 0, "dirty pages were written back");
    check(n_pinv == 9, "parameter page released once per run");
    check(n_done_irq == 9, "end-of-operation interrupt once per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
