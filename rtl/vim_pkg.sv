// vim_pkg - shared sizes, types and register map of the virtualised
// coprocessor interface.
//
// A coprocessor names its data by an object number and an element index
// (a "virtual address"); it never sees a physical address. The Interface
// Management Unit (IMU) translates the upper bits of the index, together with
// the object number, through a small TLB into one of the pages of a
// dual-port RAM that the operating system fills and drains.
//
// Sizes that follow the described system: a 16 KB dual-port RAM organised as
// eight 2 KB pages. Sizes chosen here: 32-bit words (so a 2 KB page holds 512
// words), 4-bit object numbers, 20-bit element indices (4 MB per object) and
// object 15 reserved as the parameter-passing object.
package vim_pkg;

  localparam int unsigned DATA_W      = 32;          // word width of both RAM ports
  localparam int unsigned OBJ_W       = 4;           // CP_OBJ width
  localparam int unsigned ADDR_W      = 20;          // CP_ADDR width (element index)
  localparam int unsigned PAGE_BYTES  = 2048;        // 2 KB pages
  localparam int unsigned N_PAGES     = 8;           // eight pages -> 16 KB
  localparam int unsigned PAGE_WORDS  = PAGE_BYTES / (DATA_W / 8);   // 512
  localparam int unsigned OFF_W       = $clog2(PAGE_WORDS);          // 9
  localparam int unsigned VPN_W       = ADDR_W - OFF_W;              // 11
  localparam int unsigned PPN_W       = $clog2(N_PAGES);             // 3
  localparam int unsigned DP_WORDS    = N_PAGES * PAGE_WORDS;        // 4096
  localparam int unsigned DP_AW       = $clog2(DP_WORDS);            // 12
  localparam int unsigned TLB_ENTRIES = N_PAGES;                     // one per page

  // Object number through which the operating system passes scalar
  // parameters (FPGA_EXECUTE arguments) to the coprocessor.
  localparam logic [OBJ_W-1:0] PARAM_OBJ = '1;

  // Processor-visible register map of the IMU (word addresses).
  localparam int unsigned REG_AW   = 5;
  localparam logic [REG_AW-1:0] REG_CR  = 5'd0;  // control
  localparam logic [REG_AW-1:0] REG_SR  = 5'd1;  // status
  localparam logic [REG_AW-1:0] REG_AR  = 5'd2;  // last coprocessor address
  localparam logic [REG_AW-1:0] REG_TLB = 5'd8;  // 8 .. 8+TLB_ENTRIES-1

  // CR bits. START, RESTART and ACK are write-one pulses; IRQ_EN is stored.
  localparam int unsigned CR_START   = 0;   // launch the coprocessor (CP_START)
  localparam int unsigned CR_RESTART = 1;   // retry the faulting translation
  localparam int unsigned CR_IRQ_EN  = 2;   // enable INT_PLD
  localparam int unsigned CR_ACK     = 3;   // clear the DONE status

  // SR bits.
  localparam int unsigned SR_FAULT   = 0;   // translation miss, coprocessor stalled
  localparam int unsigned SR_DONE    = 1;   // coprocessor signalled CP_FIN
  localparam int unsigned SR_BUSY    = 2;   // coprocessor running
  localparam int unsigned SR_WRITE   = 3;   // access in AR is a write

  // One TLB entry. The processor reads and writes it as the low bits of a
  // 32-bit register: {valid, dirty, obj, vpn, ppn}.
  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [OBJ_W-1:0] obj;
    logic [VPN_W-1:0] vpn;
    logic [PPN_W-1:0] ppn;
  } tlb_entry_t;

  localparam int unsigned TLB_ENTRY_W = $bits(tlb_entry_t);   // 20

  // Translation state of the IMU (see imu.sv for the cycle-by-cycle use).
  typedef enum logic [2:0] {
    IMU_IDLE,     // waiting for CP_ACCESS
    IMU_LOOKUP,   // TLB content match on the latched address
    IMU_MEM,      // dual-port RAM access with the translated address
    IMU_DATA,     // CP_TLBHIT: read data on CP_DIN / write done
    IMU_FAULT     // miss: coprocessor stalled, processor interrupted
  } imu_state_t;

endpackage
