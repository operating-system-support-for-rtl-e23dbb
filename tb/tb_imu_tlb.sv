// tb_imu_tlb - self-checking test of the IMU translation table.
//
// Fills the table with random distinct mappings through the processor port
// and keeps a copy of its own. Then, for many random (object, page) tags -
// mapped ones and unmapped ones - compares hit, index and physical page
// against that copy; checks that a write through an entry sets only its dirty
// bit, that invalidating one object clears only that object's entries, that
// invalid entries never match, and that reset empties the table.
module tb_imu_tlb;
  import vim_pkg::*;

  localparam int unsigned E  = TLB_ENTRIES;
  localparam int unsigned IW = $clog2(E);

  logic             clk = 1'b0, rst = 1'b1;
  logic [OBJ_W-1:0] lk_obj = '0;
  logic [VPN_W-1:0] lk_vpn = '0;
  logic             lk_hit;
  logic [IW-1:0]    lk_idx;
  logic [PPN_W-1:0] lk_ppn;
  logic             set_dirty = 1'b0;
  logic [IW-1:0]    dirty_idx = '0;
  logic             inv_obj_en = 1'b0;
  logic [OBJ_W-1:0] inv_obj = '0;
  logic             cpu_we = 1'b0;
  logic [IW-1:0]    cpu_idx = '0;
  tlb_entry_t       cpu_wentry = '0, cpu_rentry;

  imu_tlb #(.ENTRIES(E)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  tlb_entry_t model [E];

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

  task automatic write_entry(input int unsigned i, input tlb_entry_t e);
    @(negedge clk);
    cpu_we = 1'b1; cpu_idx = IW'(i); cpu_wentry = e;
    @(negedge clk);
    cpu_we = 1'b0;
    model[i] = e;
  endtask

  task automatic lookup_check(input logic [OBJ_W-1:0] o, input logic [VPN_W-1:0] v);
    bit exp_hit = 0;
    int unsigned exp_idx = 0;
    for (int i = E - 1; i >= 0; i--)
      if (model[i].valid && model[i].obj == o && model[i].vpn == v) begin
        exp_hit = 1; exp_idx = i;
      end
    lk_obj = o; lk_vpn = v;
    #1;
    check(lk_hit == exp_hit, $sformatf("hit for obj %0d vpn %0d", o, v));
    if (exp_hit) begin
      check(lk_idx == IW'(exp_idx), $sformatf("index for obj %0d vpn %0d", o, v));
      check(lk_ppn == model[exp_idx].ppn, $sformatf("ppn for obj %0d vpn %0d", o, v));
    end
  endtask

  initial begin
    tlb_entry_t e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // reset left nothing valid
    for (int i = 0; i < E; i++) model[i] = '0;
    for (int k = 0; k < 20; k++) lookup_check(OBJ_W'($urandom), VPN_W'($urandom % 4));

    // random distinct mappings, one per entry, one invalid
    for (int i = 0; i < E; i++) begin
      e.valid = (i != 5);
      e.dirty = 1'b0;
      e.obj   = OBJ_W'(i % 3);
      e.vpn   = VPN_W'(i);
      e.ppn   = PPN_W'(E - 1 - i);
      write_entry(i, e);
    end
    for (int i = 0; i < E; i++) begin
      cpu_idx = IW'(i); #1;
      check(cpu_rentry == model[i], $sformatf("read back entry %0d", i));
    end
    for (int k = 0; k < 300; k++) lookup_check(OBJ_W'($urandom % 4), VPN_W'($urandom % 10));
    for (int i = 0; i < E; i++) lookup_check(model[i].obj, model[i].vpn);

    // dirty marking
    @(negedge clk); set_dirty = 1'b1; dirty_idx = IW'(3);
    @(negedge clk); set_dirty = 1'b0;
    model[3].dirty = 1'b1;
    for (int i = 0; i < E; i++) begin
      cpu_idx = IW'(i); #1;
      check(cpu_rentry == model[i], $sformatf("dirty marking, entry %0d", i));
    end

    // invalidate object 1
    @(negedge clk); inv_obj_en = 1'b1; inv_obj = OBJ_W'(1);
    @(negedge clk); inv_obj_en = 1'b0;
    for (int i = 0; i < E; i++) if (model[i].obj == OBJ_W'(1)) model[i].valid = 1'b0;
    for (int i = 0; i < E; i++) begin
      cpu_idx = IW'(i); #1;
      check(cpu_rentry == model[i], $sformatf("invalidate, entry %0d", i));
      lookup_check(model[i].obj, model[i].vpn);
    end

    // a processor write beats a dirty update of the same entry
    e = '{valid: 1'b1, dirty: 1'b0, obj: OBJ_W'(7), vpn: VPN_W'(100), ppn: PPN_W'(6)};
    @(negedge clk);
    cpu_we = 1'b1; cpu_idx = IW'(2); cpu_wentry = e; set_dirty = 1'b1; dirty_idx = IW'(2);
    @(negedge clk);
    cpu_we = 1'b0; set_dirty = 1'b0;
    model[2] = e;
    cpu_idx = IW'(2); #1;
    check(cpu_rentry == e, "processor write has priority");
    lookup_check(OBJ_W'(7), VPN_W'(100));

    // reset clears the table
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < E; i++) model[i] = '0;
    for (int i = 0; i < E; i++) begin
      cpu_idx = IW'(i); #1;
      check(cpu_rentry.valid == 1'b0, $sformatf("reset clears entry %0d", i));
    end
    lookup_check(OBJ_W'(7), VPN_W'(100));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
