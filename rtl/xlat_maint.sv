// Maintenance sequencer of the address translator.
//
// Keeps the translation table in step with main memory: it inserts the cell
// of a page when the page is loaded and deletes it when the page is
// discarded. These are the only operations that change the table; context
// switches do not touch it.
//
// The table is a hash table with embedded overflow: synonyms are kept in
// otherwise free cells of the same table, chained through the link field,
// and the last cell of a chain has its end-of-chain flag set. This sequencer
// keeps every chain pure: the chain starting at cell h holds only pages that
// hash to h, so a lookup never walks through another chain's entries.
//   insert, home cell empty    : write the page into its home cell.
//   insert, home cell own chain: check the chain for the page (duplicate),
//                                take a free cell and link it in right
//                                after the home cell.
//   insert, home cell borrowed : the home cell holds an overflow entry of
//                                another chain. That entry is copied to a
//                                free cell, its predecessor is relinked to
//                                the copy, and the new page takes its home.
//   delete at the chain head   : a lone head is cleared; otherwise the
//                                second cell is copied into the head and
//                                then cleared.
//   delete further down        : the predecessor takes over the deleted
//                                cell's link and end-of-chain flag.
// Free cells are found by scanning the table from a rotating pointer,
// two cycles per cell inspected.
//
// After reset the sequencer clears every cell, one per cycle; init_done
// rises when the table is empty and usable.
//
// Handshake: cmd_valid/cmd_ready. A command is accepted only when grant is
// high (no translation in flight); busy is high from acceptance until the
// cycle after done_valid, a one-cycle pulse carrying the status and the cell
// that now holds the page (insert) or that was freed (delete). occupancy
// counts the valid cells.
//
// Table access: one read per cycle with one cycle latency, one write per
// cycle. The sequencer never reads a cell in the same cycle it writes it.
//
// That insertion and deletion happen only on page load and discard is from
// the translator's description, which leaves them to microcode or the
// kernel; the algorithm and its timing are this design's own.
`include "xlat_cell.svh"
module xlat_maint
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
  input  logic               grant,
  output logic               busy,
  output logic               init_done,
  // command
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  maint_op_e          cmd_op,
  input  logic [VPN_W-1:0]   cmd_vpn,
  input  logic [FRAME_W-1:0] cmd_frame,
  input  logic               cmd_ro,
  // completion
  output logic               done_valid,
  output maint_status_e      done_status,
  output logic [CELL_AW-1:0] done_cell,
  output logic [CELL_AW:0]   occupancy,
  // translation table ports
  output logic               rd_en,
  output logic [CELL_AW-1:0] rd_addr,
  input  logic [CELL_W-1:0]  rd_data,
  output logic               wr_en,
  output logic [CELL_AW-1:0] wr_addr,
  output logic [CELL_W-1:0]  wr_data
);

  `XLAT_CELL_T

  typedef enum logic [3:0] {
    S_INIT,      // clearing the table
    S_IDLE,
    S_HOME,      // home cell data on rd_data
    S_WALK_DUP,  // insert: walking own chain looking for the page
    S_SCAN_RD,   // free scan: read scan_q
    S_SCAN_CHK,  // free scan: scan_q data on rd_data
    S_PRED_RD,   // relocate: read the other chain's home cell
    S_PRED,      // relocate: walking the other chain for the predecessor
    S_DEL_WALK,  // delete: walking the chain for the page
    S_DEL_SUCC,  // delete at head: successor data on rd_data
    S_WR2,       // second write of a two-write update
    S_DONE       // report
  } state_e;

  typedef enum logic {M_APPEND, M_RELOCATE} mode_e;

  localparam int unsigned NCELLS = 2**CELL_AW;

  state_e             state_q;
  mode_e              mode_q;
  maint_op_e          op_q;
  logic [VPN_W-1:0]   vpn_q;
  logic [FRAME_W-1:0] frame_q;
  logic               ro_q;
  logic [CELL_AW-1:0] home_q;     // home cell of the command's page
  cell_t              saved_q;    // home cell contents / moved entry
  logic [CELL_AW-1:0] cur_q;      // cell whose data arrives next
  logic [CELL_AW-1:0] prev_q;     // predecessor of cur_q in the chain
  cell_t              prev_d_q;   // its contents
  logic [CELL_AW-1:0] free_q;     // free cell found by the scan
  logic [CELL_AW-1:0] scan_q;     // rotating free-scan pointer
  logic [CELL_AW:0]   scan_cnt_q; // cells inspected in this scan
  logic [CELL_AW-1:0] init_q;
  logic [CELL_AW:0]   occ_q;
  maint_status_e      status_q;
  logic [CELL_AW-1:0] res_cell_q;
  logic [CELL_AW-1:0] other_home_q; // home of the entry in a borrowed cell
  logic [CELL_AW-1:0] wr2_addr_q;
  cell_t              wr2_data_q;

  cell_t              d;          // data read from the table
  cell_t              new_cell;   // cell for the command's page
  cell_t              empty_cell;
  logic [CELL_AW-1:0] cmd_home, d_home;

  assign d = cell_t'(rd_data);

  hash_gen #(.VPN_W(VPN_W), .CELL_AW(CELL_AW)) u_hash_cmd (
    .vpn (cmd_vpn), .idx (cmd_home)
  );
  hash_gen #(.VPN_W(VPN_W), .CELL_AW(CELL_AW)) u_hash_rd (
    .vpn (d.key), .idx (d_home)
  );

  always_comb begin
    new_cell       = '0;
    new_cell.key   = vpn_q;
    new_cell.ro    = ro_q;
    new_cell.valid = 1'b1;
    new_cell.eoc   = 1'b1;
    new_cell.frame = frame_q;
    empty_cell     = '0;
    empty_cell.eoc = 1'b1;
  end

  assign cmd_ready   = (state_q == S_IDLE) && grant;
  assign busy        = (state_q != S_IDLE);
  assign init_done   = (state_q != S_INIT);
  assign done_valid  = (state_q == S_DONE);
  assign done_status = status_q;
  assign done_cell   = res_cell_q;
  assign occupancy   = occ_q;

  // Table port requests, decided from the current state and read data.
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = cur_q;
    wr_en   = 1'b0;
    wr_addr = '0;
    wr_data = '0;
    unique case (state_q)
      S_INIT: begin
        wr_en   = 1'b1;
        wr_addr = init_q;
        wr_data = empty_cell;
      end
      S_IDLE: begin
        rd_en   = cmd_valid && grant;
        rd_addr = cmd_home;
      end
      S_HOME: begin
        if (op_q == OP_INSERT) begin
          if (!d.valid) begin
            wr_en = 1'b1; wr_addr = home_q; wr_data = new_cell;
          end else if (d_home == home_q && d.key != vpn_q && !d.eoc) begin
            rd_en = 1'b1; rd_addr = d.link;
          end
        end else if (d.valid && d_home == home_q) begin
          if (d.key == vpn_q) begin
            if (d.eoc) begin
              wr_en = 1'b1; wr_addr = home_q; wr_data = empty_cell;
            end else begin
              rd_en = 1'b1; rd_addr = d.link;
            end
          end else if (!d.eoc) begin
            rd_en = 1'b1; rd_addr = d.link;
          end
        end
      end
      S_WALK_DUP, S_DEL_WALK, S_PRED: begin
        if (state_q == S_PRED && d.link == home_q && d.valid && !d.eoc) begin
          // predecessor of the borrowed home cell: relink it to the copy
          wr_en   = 1'b1;
          wr_addr = cur_q;
          wr_data = d;
          wr_data[FRAME_W+3 +: CELL_AW] = free_q;
        end else if (state_q == S_DEL_WALK && d.key == vpn_q) begin
          wr_en   = 1'b1;
          wr_addr = prev_q;
          wr_data = prev_d_q;
          wr_data[FRAME_W+3 +: CELL_AW] = d.link;
          wr_data[FRAME_W]              = d.eoc;
        end else if (d.valid && !d.eoc && !(state_q == S_WALK_DUP && d.key == vpn_q)) begin
          rd_en = 1'b1; rd_addr = d.link;
        end
      end
      S_SCAN_RD: begin
        rd_en = 1'b1; rd_addr = scan_q;
      end
      S_PRED_RD: begin
        rd_en = 1'b1; rd_addr = cur_q;
      end
      S_SCAN_CHK: begin
        if (!d.valid) begin
          wr_en   = 1'b1;
          wr_addr = scan_q;
          if (mode_q == M_APPEND) begin
            wr_data      = new_cell;
            wr_data[FRAME_W+3 +: CELL_AW] = saved_q.link;
            wr_data[FRAME_W]              = saved_q.eoc;
          end else begin
            wr_data = saved_q;
          end
        end
      end
      S_DEL_SUCC: begin
        wr_en = 1'b1; wr_addr = home_q; wr_data = d;
      end
      S_WR2: begin
        wr_en = 1'b1; wr_addr = wr2_addr_q; wr_data = wr2_data_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_INIT;
      mode_q     <= M_APPEND;
      op_q       <= OP_INSERT;
      vpn_q      <= '0;
      frame_q    <= '0;
      ro_q       <= 1'b0;
      home_q     <= '0;
      saved_q    <= '0;
      cur_q      <= '0;
      prev_q     <= '0;
      prev_d_q   <= '0;
      free_q     <= '0;
      scan_q     <= '0;
      scan_cnt_q <= '0;
      init_q     <= '0;
      occ_q      <= '0;
      status_q   <= ST_OK;
      res_cell_q <= '0;
      other_home_q <= '0;
      wr2_addr_q <= '0;
      wr2_data_q <= '0;
    end else begin
      unique case (state_q)
        S_INIT: begin
          init_q <= init_q + 1'b1;
          if (init_q == CELL_AW'(NCELLS-1)) state_q <= S_IDLE;
        end

        S_IDLE: begin
          if (cmd_valid && grant) begin
            op_q    <= cmd_op;
            vpn_q   <= cmd_vpn;
            frame_q <= cmd_frame;
            ro_q    <= cmd_ro;
            home_q  <= cmd_home;
            cur_q   <= cmd_home;
            state_q <= S_HOME;
          end
        end

        S_HOME: begin
          saved_q      <= d;
          other_home_q <= d_home;
          if (op_q == OP_INSERT) begin
            if (!d.valid) begin
              status_q   <= ST_OK;
              res_cell_q <= home_q;
              occ_q      <= occ_q + 1'b1;
              state_q    <= S_DONE;
            end else if (d_home == home_q) begin
              if (d.key == vpn_q) begin
                status_q   <= ST_DUPLICATE;
                res_cell_q <= home_q;
                state_q    <= S_DONE;
              end else if (d.eoc) begin
                mode_q     <= M_APPEND;
                scan_cnt_q <= '0;
                state_q    <= S_SCAN_RD;
              end else begin
                cur_q      <= d.link;
                state_q    <= S_WALK_DUP;
              end
            end else begin
              mode_q     <= M_RELOCATE;
              scan_cnt_q <= '0;
              state_q    <= S_SCAN_RD;
            end
          end else begin
            if (!d.valid || d_home != home_q) begin
              status_q <= ST_NOT_FOUND;
              state_q  <= S_DONE;
            end else if (d.key == vpn_q) begin
              res_cell_q <= home_q;
              if (d.eoc) begin
                status_q <= ST_OK;
                occ_q    <= occ_q - 1'b1;
                state_q  <= S_DONE;
              end else begin
                cur_q   <= d.link;
                state_q <= S_DEL_SUCC;
              end
            end else if (d.eoc) begin
              status_q <= ST_NOT_FOUND;
              state_q  <= S_DONE;
            end else begin
              prev_q   <= home_q;
              prev_d_q <= d;
              cur_q    <= d.link;
              state_q  <= S_DEL_WALK;
            end
          end
        end

        S_WALK_DUP: begin
          if (d.key == vpn_q) begin
            status_q   <= ST_DUPLICATE;
            res_cell_q <= cur_q;
            state_q    <= S_DONE;
          end else if (d.eoc) begin
            mode_q     <= M_APPEND;
            scan_cnt_q <= '0;
            state_q    <= S_SCAN_RD;
          end else begin
            cur_q <= d.link;
          end
        end

        S_SCAN_RD: begin
          if (scan_cnt_q == (CELL_AW+1)'(NCELLS)) begin
            status_q <= ST_FULL;
            state_q  <= S_DONE;
          end else begin
            state_q <= S_SCAN_CHK;
          end
        end

        S_SCAN_CHK: begin
          scan_q     <= scan_q + 1'b1;
          scan_cnt_q <= scan_cnt_q + 1'b1;
          if (!d.valid) begin
            free_q   <= scan_q;
            occ_q    <= occ_q + 1'b1;
            status_q <= ST_OK;
            if (mode_q == M_APPEND) begin
              // then point the home cell at the new overflow cell
              res_cell_q      <= scan_q;
              wr2_addr_q      <= home_q;
              wr2_data_q      <= saved_q;
              wr2_data_q.link <= scan_q;
              wr2_data_q.eoc  <= 1'b0;
              state_q         <= S_WR2;
            end else begin
              // then find the predecessor of the borrowed cell
              res_cell_q <= home_q;
              cur_q      <= other_home_q;
              state_q    <= S_PRED_RD;
            end
          end else begin
            state_q <= S_SCAN_RD;
          end
        end

        S_PRED_RD: state_q <= S_PRED;

        S_PRED: begin
          if ((d.link == home_q && d.valid && !d.eoc) || !d.valid || d.eoc) begin
            // predecessor relinked (or chain ended): page takes its home
            wr2_addr_q <= home_q;
            wr2_data_q <= new_cell;
            state_q    <= S_WR2;
          end else begin
            cur_q <= d.link;
          end
        end

        S_DEL_WALK: begin
          if (d.valid && d.key == vpn_q) begin
            status_q   <= ST_OK;
            res_cell_q <= cur_q;
            occ_q      <= occ_q - 1'b1;
            wr2_addr_q <= cur_q;
            wr2_data_q <= empty_cell;
            state_q    <= S_WR2;
          end else if (!d.valid || d.eoc) begin
            status_q <= ST_NOT_FOUND;
            state_q  <= S_DONE;
          end else begin
            prev_q   <= cur_q;
            prev_d_q <= d;
            cur_q    <= d.link;
          end
        end

        S_DEL_SUCC: begin
          // head now holds the successor; free the successor's cell
          status_q   <= ST_OK;
          res_cell_q <= cur_q;
          occ_q      <= occ_q - 1'b1;
          wr2_addr_q <= cur_q;
          wr2_data_q <= empty_cell;
          state_q    <= S_WR2;
        end

        S_WR2:  state_q <= S_DONE;

        S_DONE: state_q <= S_IDLE;

        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
