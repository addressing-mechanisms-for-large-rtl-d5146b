// Hashed address translator for a large, sparsely used virtual memory.
//
// Unlike a translation lookaside buffer, which caches a few translations,
// this translator holds an entry for every page frame of main memory, so a
// miss means the page is not in main memory at all: it is a page fault, and
// no page table is consulted to translate an address. The entries live in a
// hash table in dedicated memory (xlat_table). A virtual page number is
// hashed by XOR (hash_gen) to a home cell; the cell's key is compared with
// the page number (key_comparator) and, on a mismatch, the chain of synonyms
// is followed through the link fields until the end-of-chain flag
// (xlat_lookup). With a table four times as large as main memory the
// average search is about 1.125 cells. The table grows linearly with main
// memory and its width only logarithmically with the virtual address size.
//
// Entries change only when a page is loaded or discarded; xlat_maint does
// the insertion and deletion and clears the table after reset.
//
// Default sizes: 60-bit virtual addresses, 23-bit main memory addresses,
// 4 KiB pages (2048 page frames), 8192 cells.
//
// Interface and timing:
//   ready      high once the table has been cleared after reset
//              (2^CELL_AW cycles).
//   req_*      translation request, valid/ready. Accepted requests answer
//              with a one-cycle resp_valid pulse, one cycle per cell
//              searched: a page at the head of its chain answers in the
//              next cycle, and such requests can be issued every cycle.
//              resp_hit with resp_pa (frame number and page offset), or
//              resp_fault (page not resident; resp_va is the faulting
//              address). resp_prot flags a write to a read-only page.
//              resp_probes is the number of cells searched and resp_cell
//              the last cell read (the page's cell on a hit).
//   cmd_*      insert or delete one page, valid/ready; done_* reports the
//              status and cell. A command waits for any translation in
//              flight to finish, and blocks new translations until done.
//
// The table organisation, hash by XOR, compare, chain following and page
// fault come from the translator's description; the table size, cycle
// timing, handshakes, maintenance algorithm and protection fault output are
// this design's own.
module addr_translator
  import mpc_pkg::*;
#(
  parameter int unsigned VA_W    = VA_W_DEFAULT,
  parameter int unsigned PA_W    = PA_W_DEFAULT,
  parameter int unsigned PAGE_W  = PAGE_W_DEFAULT,
  parameter int unsigned CELL_AW = CELL_AW_DEFAULT,
  localparam int unsigned VPN_W   = VA_W - PAGE_W,
  localparam int unsigned FRAME_W = PA_W - PAGE_W,
  localparam int unsigned CELL_W  = VPN_W + CELL_AW + 3 + FRAME_W
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               ready,
  // translation
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [VA_W-1:0]    req_va,
  input  logic               req_write,
  output logic               resp_valid,
  output logic               resp_hit,
  output logic               resp_fault,
  output logic               resp_prot,
  output logic [PA_W-1:0]    resp_pa,
  output logic [VA_W-1:0]    resp_va,
  output logic [CELL_AW-1:0] resp_cell,
  output logic [CELL_AW:0]   resp_probes,
  // table maintenance (page load / discard)
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  maint_op_e          cmd_op,
  input  logic [VPN_W-1:0]   cmd_vpn,
  input  logic [FRAME_W-1:0] cmd_frame,
  input  logic               cmd_ro,
  output logic               done_valid,
  output maint_status_e      done_status,
  output logic [CELL_AW-1:0] done_cell,
  output logic [CELL_AW:0]   occupancy
);

  logic               lk_idle, lk_hold, lk_rd_en;
  logic [CELL_AW-1:0] lk_rd_addr;
  logic               mt_busy, mt_rd_en, mt_wr_en, init_done;
  logic [CELL_AW-1:0] mt_rd_addr, mt_wr_addr;
  logic [CELL_W-1:0]  mt_wr_data, rd_data;
  logic               lk_req_ready;

  // Maintenance has priority for new work: a pending command stops new
  // translations, and starts once the translation in flight has finished.
  assign lk_hold   = mt_busy || cmd_valid || !init_done;
  assign ready     = init_done;
  assign req_ready = lk_req_ready;

  xlat_lookup #(
    .VA_W(VA_W), .PA_W(PA_W), .PAGE_W(PAGE_W), .CELL_AW(CELL_AW)
  ) u_lookup (
    .clk, .rst_n,
    .hold        (lk_hold),
    .idle        (lk_idle),
    .req_valid,
    .req_ready   (lk_req_ready),
    .req_va,
    .req_write,
    .resp_valid, .resp_hit, .resp_fault, .resp_prot, .resp_pa, .resp_va,
    .resp_cell,
    .resp_probes,
    .rd_en       (lk_rd_en),
    .rd_addr     (lk_rd_addr),
    .rd_data     (rd_data)
  );

  xlat_maint #(
    .VA_W(VA_W), .PA_W(PA_W), .PAGE_W(PAGE_W), .CELL_AW(CELL_AW)
  ) u_maint (
    .clk, .rst_n,
    .grant       (lk_idle),
    .busy        (mt_busy),
    .init_done   (init_done),
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_vpn, .cmd_frame, .cmd_ro,
    .done_valid, .done_status, .done_cell, .occupancy,
    .rd_en       (mt_rd_en),
    .rd_addr     (mt_rd_addr),
    .rd_data     (rd_data),
    .wr_en       (mt_wr_en),
    .wr_addr     (mt_wr_addr),
    .wr_data     (mt_wr_data)
  );

  xlat_table #(.CELL_AW(CELL_AW), .CELL_W(CELL_W)) u_table (
    .clk,
    .re    (mt_busy || mt_rd_en ? mt_rd_en : lk_rd_en),
    .raddr (mt_busy || mt_rd_en ? mt_rd_addr : lk_rd_addr),
    .rdata (rd_data),
    .we    (mt_wr_en),
    .waddr (mt_wr_addr),
    .wdata (mt_wr_data)
  );

  // The two sequencers never use the table in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(mt_rd_en && lk_rd_en));

endmodule
