// cp_mem_model - behavioural stand-in for the IMU plus interface memory,
// used to test coprocessors on their own.
//
// It answers coprocessor requests from a flat memory indexed by
// (object, index), with no pages and no TLB. A request is answered with the
// IMU's hit timing: CP_TLBHIT (and, for a read, CP_DIN) in the fourth cycle
// after CP_ACCESS rises. With stall_en set, about one request in four is
// held for a random 1..24 extra cycles, the way a page fault stalls the
// coprocessor. Counts of requests, writes and stalled requests are kept for
// the testbench; the memory (mem) is read and written by the testbench
// through hierarchical references.
module cp_mem_model
  import vim_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              stall_en,
  input  logic [OBJ_W-1:0]  cp_obj,
  input  logic [ADDR_W-1:0] cp_addr,
  input  logic [DATA_W-1:0] cp_dout,
  output logic [DATA_W-1:0] cp_din,
  input  logic              cp_access,
  input  logic              cp_wr,
  output logic              cp_tlbhit
);

  logic [DATA_W-1:0] mem [int unsigned];
  int unsigned cnt, target;
  int n_req = 0, n_wr = 0, n_stalled = 0;

  function automatic int unsigned key(input logic [OBJ_W-1:0] o, input logic [ADDR_W-1:0] a);
    return (32'(o) << ADDR_W) | 32'(a);
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      cp_tlbhit <= 1'b0;
      cp_din    <= '0;
      cnt       = 0;
    end else if (cp_tlbhit) begin
      cp_tlbhit <= 1'b0;
    end else if (cp_access) begin
      if (cnt == 0) begin
        target = 2;
        if (stall_en && ($urandom % 4) == 0) begin
          target = target + 1 + ($urandom % 24);
          n_stalled++;
        end
      end
      if (cnt == target) begin
        n_req++;
        cp_tlbhit <= 1'b1;
        if (cp_wr) begin
          mem[key(cp_obj, cp_addr)] = cp_dout;
          n_wr++;
        end else begin
          cp_din <= mem.exists(key(cp_obj, cp_addr)) ? mem[key(cp_obj, cp_addr)] : '0;
        end
        cnt = 0;
      end else begin
        cnt = cnt + 1;
      end
    end
  end

endmodule
