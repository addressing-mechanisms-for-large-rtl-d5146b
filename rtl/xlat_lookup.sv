// Lookup sequencer of the address translator (chain walker).
//
// Translates one virtual address at a time. When a request is accepted the
// page number is hashed and the hashed cell is read from the translation
// table. In the next cycle the key comparator classifies that cell: on a hit
// the cell's page frame number and the untouched page offset form the main
// memory address; on a mismatch with more synonyms the cell's link field is
// sent to the table in the same cycle, so the next synonym arrives one cycle
// later (fetch of the next cell overlaps the compare of the current one); at
// the end of the chain a page fault is reported. A translation therefore
// takes exactly one cycle per cell searched, so a page found at the head of
// its chain is translated in one cycle.
//
// A write access to a page whose cell has the read-only bit set is reported
// as a protection fault (resp_hit and resp_prot both high); the address is
// still formed. A chain longer than the table (only possible if the table
// is corrupt) ends the search with a page fault.
//
// Handshake: req_valid/req_ready; req_ready is high when the sequencer is
// idle, or in the cycle its current translation finishes, so head-of-chain
// hits can be issued back to back, one per cycle. resp_valid is a one-cycle
// pulse, combinational from the table's read data, in the cycle the search
// ends; there is no back-pressure on responses. While hold is high no new
// request is accepted (the maintenance sequencer owns the table); idle tells
// that no translation is in flight.
//
// The hash, compare and chain-following steps and the overlapped fetch come
// from the translator's description; the one-cycle table read, the
// handshake, the protection fault and the probe count output are this
// design's choices.
`include "xlat_cell.svh"
module xlat_lookup
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
  input  logic               hold,
  output logic               idle,
  // translation request
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [VA_W-1:0]    req_va,
  input  logic               req_write,
  // translation result
  output logic               resp_valid,
  output logic               resp_hit,
  output logic               resp_fault,
  output logic               resp_prot,
  output logic [PA_W-1:0]    resp_pa,
  output logic [VA_W-1:0]    resp_va,
  output logic [CELL_AW-1:0] resp_cell,
  output logic [CELL_AW:0]   resp_probes,
  // translation table read port
  output logic               rd_en,
  output logic [CELL_AW-1:0] rd_addr,
  input  logic [CELL_W-1:0]  rd_data
);

  `XLAT_CELL_T

  typedef enum logic {S_IDLE, S_PROBE} state_e;

  state_e             state_q;
  logic [VA_W-1:0]    va_q;
  logic               write_q;
  logic [CELL_AW-1:0] cell_q;
  logic [CELL_AW:0]   probes_q;

  cell_t              cur;
  logic [CELL_AW-1:0] home;
  logic               hit, follow, last, too_long, done, accept;

  assign cur = cell_t'(rd_data);

  hash_gen #(.VPN_W(VPN_W), .CELL_AW(CELL_AW)) u_hash (
    .vpn  (req_va[VA_W-1:PAGE_W]),
    .idx (home)
  );

  key_comparator #(.VPN_W(VPN_W)) u_cmp (
    .vpn    (va_q[VA_W-1:PAGE_W]),
    .key    (cur.key),
    .valid  (cur.valid),
    .eoc    (cur.eoc),
    .hit    (hit),
    .follow (follow),
    .last   (last)
  );

  always_comb begin
    too_long  = (probes_q == (CELL_AW+1)'(2**CELL_AW));
    done      = (state_q == S_PROBE) && (hit || last || too_long);
    req_ready = !hold && ((state_q == S_IDLE) || done);
    accept    = req_valid && req_ready;
    rd_en     = accept || ((state_q == S_PROBE) && follow && !too_long);
    rd_addr   = accept ? home : cur.link;
    idle      = (state_q == S_IDLE);

    resp_valid  = done;
    resp_hit    = done && hit;
    resp_fault  = done && !hit;
    resp_prot   = done && hit && write_q && cur.ro;
    resp_pa     = {cur.frame, va_q[PAGE_W-1:0]};
    resp_va     = va_q;
    resp_cell   = cell_q;
    resp_probes = probes_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      va_q     <= '0;
      write_q  <= 1'b0;
      cell_q   <= '0;
      probes_q <= '0;
    end else if (accept) begin
      state_q  <= S_PROBE;
      va_q     <= req_va;
      write_q  <= req_write;
      cell_q   <= home;
      probes_q <= (CELL_AW+1)'(1);
    end else if (done) begin
      state_q  <= S_IDLE;
    end else if (state_q == S_PROBE) begin
      cell_q   <= cur.link;
      probes_q <= probes_q + 1'b1;
    end
  end

endmodule
