// imu_tlb - translation lookaside buffer of the Interface Management Unit.
//
// A fully associative table of ENTRIES entries, each holding
// {valid, dirty, object, virtual page, physical page}. The lookup port
// compares an (object, virtual page) tag against every valid entry at once,
// the way a content-addressable memory does, and returns whether one matched,
// its index and the physical page it stores (the RAM half of the table).
// With several matches the lowest index wins; the operating system is
// expected never to map one virtual page twice.
//
// The processor reads and writes whole entries through a separate port (this
// is how the page-fault handler installs a mapping and finds dirty pages).
// The IMU sets an entry's dirty bit when the coprocessor writes through it,
// and can clear the valid bit of every entry of one object at once (used
// when the coprocessor releases the parameter-passing page).
//
// Timing: lookup and processor read are combinational; updates take effect at
// the next rising clock edge. A processor write to an entry has priority over
// a dirty-bit update or an invalidation of the same entry in the same cycle.
// Reset (synchronous, active high) clears every entry.
//
// The split into a content-matched tag part and a RAM part follows the
// described implementation; the entry count (one per dual-port RAM page), the
// priority rules and the per-object invalidation are choices of this design.
module imu_tlb
  import vim_pkg::*;
#(
  parameter int unsigned ENTRIES = TLB_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst,
  // lookup
  input  logic [OBJ_W-1:0]           lk_obj,
  input  logic [VPN_W-1:0]           lk_vpn,
  output logic                       lk_hit,
  output logic [$clog2(ENTRIES)-1:0] lk_idx,
  output logic [PPN_W-1:0]           lk_ppn,
  // dirty marking by the IMU
  input  logic                       set_dirty,
  input  logic [$clog2(ENTRIES)-1:0] dirty_idx,
  // invalidate every entry that belongs to one object
  input  logic                       inv_obj_en,
  input  logic [OBJ_W-1:0]           inv_obj,
  // processor port
  input  logic                       cpu_we,
  input  logic [$clog2(ENTRIES)-1:0] cpu_idx,
  input  tlb_entry_t                 cpu_wentry,
  output tlb_entry_t                 cpu_rentry
);

  localparam int unsigned IW = $clog2(ENTRIES);

  tlb_entry_t tab [ENTRIES];

  // Content match.
  logic [ENTRIES-1:0] match;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      match[i] = tab[i].valid && (tab[i].obj == lk_obj) && (tab[i].vpn == lk_vpn);
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        lk_hit = 1'b1;
        lk_idx = IW'(i);
      end
    end
  end

  assign lk_ppn     = tab[lk_idx].ppn;
  assign cpu_rentry = tab[cpu_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (cpu_we && cpu_idx == IW'(i)) begin
          tab[i] <= cpu_wentry;
        end else begin
          if (inv_obj_en && tab[i].obj == inv_obj) tab[i].valid <= 1'b0;
          if (set_dirty && dirty_idx == IW'(i))    tab[i].dirty <= 1'b1;
        end
      end
    end
  end

endmodule
