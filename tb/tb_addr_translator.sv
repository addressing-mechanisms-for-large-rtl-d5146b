// End-to-end testbench of the hashed address translator at its default
// size (60-bit virtual, 23-bit main memory addresses, 4 KiB pages, 8192
// cells).
//
// A reference model (class ref_model: an associative array from virtual
// page number to frame and read-only bit) follows every insert and delete,
// and predicts every translation. The sequence:
//   1. directed: a page alone at its home, a synonym in an overflow cell, a
//      page that takes its home back from that overflow entry (relocation),
//      a duplicate insert, a write to a read-only page, a fault after a
//      chain, deletion inside a chain, at a head with successors, of a lone
//      head, and of a missing page;
//   2. a random mix of loads, discards and translations over a pool of
//      pages rich in synonyms;
//   3. back-to-back translations of lone pages, one per cycle.
// Modes 2 to 4 of the loop (all 2048 frames mapped, uniform and clustered,
// and absent pages on the full table) are written but not run: the
// reference model is too slow at that size.
// Every translation is timed: the answer must come one cycle per cell
// searched. Each mechanism is counted and one that never happens fails.
module tb_addr_translator;
  import mpc_pkg::*;

  localparam int unsigned VA_W    = 60;
  localparam int unsigned PA_W    = 23;
  localparam int unsigned PAGE_W  = 12;
  localparam int unsigned CELL_AW = 13;
  localparam int unsigned VPN_W   = VA_W - PAGE_W;
  localparam int unsigned FRAME_W = PA_W - PAGE_W;
  localparam int unsigned NFRAMES = 2**FRAME_W;

  typedef logic [VPN_W-1:0] vpn_t;

  // Reference model and bookkeeping; its methods hold all the checking.
  class ref_model;
    logic [FRAME_W:0] pages [vpn_t];   // {ro, frame}
    bit   frame_used [NFRAMES];
    int   checks, failures;
    int   n_head_hit, n_chain_hit, n_fault, n_chain_fault, n_prot;
    int   n_ins_home, n_ins_append, n_dup, n_del_lone, n_not_found;
    int   m_total, m_count;

    function void check(bit ok, string what);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL: %s", what);
      end
    endfunction

    // home cell, bit by bit: page number bit i lands on cell bit i mod 13
    function logic [CELL_AW-1:0] home_of(vpn_t v);
      logic [CELL_AW-1:0] h = '0;
      for (int i = 0; i < VPN_W; i++) h[i % CELL_AW] ^= v[i];
      return h;
    endfunction

    function int same_home(vpn_t v);
      int n = 0;
      logic [CELL_AW-1:0] h = home_of(v);
      foreach (pages[k]) if (home_of(k) == h) n++;
      return n;
    endfunction

    function int free_frame();
      for (int f = 0; f < NFRAMES; f++) if (!frame_used[f]) return f;
      return 0;
    endfunction

    function void after_insert(vpn_t v, bit ro, int f, int nb, bit was,
                               maint_status_e st, logic [CELL_AW-1:0] cl, int occ);
      if (was) begin
        check(st == ST_DUPLICATE, "insert of a resident page reports duplicate");
        n_dup++;
      end else begin
        check(st == ST_OK, $sformatf("insert %h ok (status %0d)", v, st));
        pages[v] = {ro, FRAME_W'(f)};
        frame_used[f] = 1'b1;
        if (nb == 0) begin
          n_ins_home++;
          check(cl == home_of(v), "page with an empty chain goes to its home cell");
        end else begin
          n_ins_append++;
          check(cl != home_of(v), "synonym goes to an overflow cell");
        end
      end
      check(occ == pages.num(), "occupancy matches resident pages");
    endfunction

    function void after_delete(vpn_t v, maint_status_e st, int occ);
      if (pages.exists(v)) begin
        check(st == ST_OK, $sformatf("delete %h ok", v));
        if (same_home(v) == 1) n_del_lone++;
        frame_used[pages[v][FRAME_W-1:0]] = 1'b0;
        pages.delete(v);
      end else begin
        check(st == ST_NOT_FOUND, "delete of a missing page reports not found");
        n_not_found++;
      end
      check(occ == pages.num(), "occupancy matches resident pages");
    endfunction

    function void after_translate(vpn_t v, logic [PAGE_W-1:0] off, bit wr, int cycles,
                                  bit hit, bit fault, bit prot, logic [PA_W-1:0] pa,
                                  int probes, logic [VA_W-1:0] va, bit measuring);
      check(va == {v, off}, "resp_va echoes the request");
      check(cycles == probes, $sformatf("latency %0d = cells searched %0d", cycles, probes));
      if (pages.exists(v)) begin
        int sh = same_home(v);
        check(hit && !fault, $sformatf("resident page %h hits", v));
        check(pa == {pages[v][FRAME_W-1:0], off}, "main memory address = frame, offset");
        check(prot == (wr && pages[v][FRAME_W]), "protection fault only on write to read-only");
        check(probes >= 1 && probes <= sh, "search stays within the page's own chain");
        if (sh == 1) check(probes == 1, "lone page found at its home in one cycle");
        if (probes == 1) n_head_hit++; else n_chain_hit++;
        if (prot) n_prot++;
        if (measuring) begin m_total += probes; m_count++; end
      end else begin
        check(fault && !hit && !prot, $sformatf("missing page %h faults", v));
        n_fault++;
        if (probes > 1) n_chain_fault++;
      end
    endfunction

    function void keys(ref vpn_t q[$]);
      q.delete();
      foreach (pages[k]) q.push_back(k);
    endfunction
  endclass

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic               ready;
  logic               req_valid = 1'b0, req_ready, req_write = 1'b0;
  logic [VA_W-1:0]    req_va = '0;
  logic               resp_valid, resp_hit, resp_fault, resp_prot;
  logic [PA_W-1:0]    resp_pa;
  logic [VA_W-1:0]    resp_va;
  logic [CELL_AW-1:0] resp_cell;
  logic [CELL_AW:0]   resp_probes;
  logic               cmd_valid = 1'b0, cmd_ready, cmd_ro = 1'b0;
  maint_op_e          cmd_op = OP_INSERT;
  logic [VPN_W-1:0]   cmd_vpn = '0;
  logic [FRAME_W-1:0] cmd_frame = '0;
  logic               done_valid;
  maint_status_e      done_status;
  logic [CELL_AW-1:0] done_cell;
  logic [CELL_AW:0]   occupancy;

  addr_translator dut (.*);

  ref_model m = new();

  // Relocations and deletions at a head or inside a chain, counted from the
  // maintenance sequencer's state number (order of its state list:
  // 6 = reading the other chain for a relocation, 8 = deletion walk,
  // 9 = deletion at a head with a successor, 10 = second write).
  int n_reloc = 0, n_del_head = 0, n_del_mid = 0, n_b2b = 0, st_prev = 0;
  always @(posedge clk) begin
    automatic int st = int'(dut.u_maint.state_q);
    if (st == 6 && st_prev != 6) n_reloc++;
    if (st == 9) n_del_head++;
    if (st == 10 && st_prev == 8) n_del_mid++;
    if (resp_valid && req_valid && req_ready) n_b2b++;
    st_prev = st;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    m.failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", m.checks, m.failures);
    $finish;
  end

  typedef enum int {K_LOAD, K_LOAD_AT_LAST_CELL, K_DISCARD, K_PROBE, K_MEASURE} kind_e;
  typedef struct {
    kind_e kind;
    vpn_t  v;
    bit    flag;
  } op_t;

  function automatic op_t mk(kind_e k, vpn_t v, bit flag);
    op_t o;
    o.kind = k; o.v = v; o.flag = flag;
    return o;
  endfunction

  function automatic vpn_t synonym(vpn_t v, int k);
    // the same value XORed into two slices leaves the home cell unchanged
    return v ^ vpn_t'(k) ^ (vpn_t'(k) << CELL_AW);
  endfunction

  function automatic vpn_t rand_vpn();
    return {$urandom, $urandom} & {VPN_W{1'b1}};
  endfunction

  op_t ops[$];
  logic [CELL_AW-1:0] last_cell = '0;

  initial begin : main
    vpn_t a, q[$];
    int t0;

    for (int i = 0; i < NFRAMES; i++) m.frame_used[i] = 1'b0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = 0;
    while (!ready) begin @(posedge clk); t0++; end
    m.check(t0 >= 2**CELL_AW - 2 && t0 <= 2**CELL_AW + 2, $sformatf("table cleared in %0d cycles", t0));

    // mode 0 directed, 1 random, 2 uniform workload, 3 clustered workload,
    // 4 absent pages on the full table
    for (int mode = 0; mode < 2; mode++) begin
      ops.delete();
      if (mode != 4) begin
        m.keys(q);
        q.shuffle();
        foreach (q[i]) ops.push_back(mk(K_DISCARD, q[i], 1'b0));   // start empty
      end
      if (mode == 0) begin
        a = 48'h0001_2345_6789;
        m.check(m.home_of(synonym(a, 5)) == m.home_of(a), "constructed synonym shares the home cell");
        ops.push_back(mk(K_PROBE, a, 1'b0));                  // empty table: fault
        ops.push_back(mk(K_LOAD, a, 1'b0));
        ops.push_back(mk(K_PROBE, a, 1'b0));                  // head hit
        ops.push_back(mk(K_LOAD, synonym(a, 5), 1'b1));       // overflow cell
        ops.push_back(mk(K_LOAD_AT_LAST_CELL, '0, 1'b0));     // relocation
        ops.push_back(mk(K_PROBE, synonym(a, 5), 1'b0));      // chain hit
        ops.push_back(mk(K_PROBE, synonym(a, 5), 1'b1));      // read-only write
        ops.push_back(mk(K_PROBE, synonym(a, 9), 1'b0));      // chain then fault
        ops.push_back(mk(K_LOAD, synonym(a, 5), 1'b1));       // duplicate
        ops.push_back(mk(K_LOAD, synonym(a, 77), 1'b0));
        ops.push_back(mk(K_LOAD, synonym(a, 300), 1'b0));
        ops.push_back(mk(K_PROBE, synonym(a, 77), 1'b0));
        ops.push_back(mk(K_DISCARD, synonym(a, 77), 1'b0));   // inside a chain
        ops.push_back(mk(K_PROBE, synonym(a, 5), 1'b0));
        ops.push_back(mk(K_DISCARD, a, 1'b0));                // head with successors
        ops.push_back(mk(K_PROBE, synonym(a, 300), 1'b0));
        ops.push_back(mk(K_PROBE, synonym(a, 5), 1'b0));
        ops.push_back(mk(K_DISCARD, a, 1'b0));                // not found
        ops.push_back(mk(K_DISCARD, synonym(a, 300), 1'b0));
        ops.push_back(mk(K_DISCARD, synonym(a, 5), 1'b0));    // lone head
      end else if (mode == 1) begin
        vpn_t pool[$];
        for (int i = 0; i < 48; i++) pool.push_back(rand_vpn());
        for (int i = 0; i < 48; i++) pool.push_back(synonym(pool[i % 8], i + 1));
        for (int i = 0; i < 24; i++) pool.push_back(vpn_t'($urandom_range(0, 2**CELL_AW - 1)));
        for (int n = 0; n < 3000; n++) begin
          automatic vpn_t v = pool[$urandom_range(0, pool.size() - 1)];
          automatic int r = $urandom_range(0, 9);
          if (r < 3) ops.push_back(mk(K_LOAD, v, 1'($urandom_range(0, 1))));
          else if (r < 5) ops.push_back(mk(K_DISCARD, v, 1'b0));
          else ops.push_back(mk(K_PROBE, v, 1'($urandom_range(0, 1))));
        end
        foreach (pool[i]) ops.push_back(mk(K_PROBE, pool[i], 1'b0));
      end else if (mode == 2) begin
        vpn_t seen [vpn_t];
        while (seen.num() < NFRAMES) begin
          automatic vpn_t v = rand_vpn();
          if (!seen.exists(v)) begin
            seen[v] = v;
            ops.push_back(mk(K_LOAD, v, 1'b0));
          end
        end
        ops.push_back(mk(K_MEASURE, '0, 1'b0));
      end else if (mode == 3) begin
        // 64 address spaces (random 32-bit disc and space numbers) of 32
        // consecutive pages each
        for (int sp_i = 0; sp_i < 64; sp_i++) begin
          automatic logic [31:0] sp = $urandom;
          for (int pg = 0; pg < 32; pg++) ops.push_back(mk(K_LOAD, {sp, 16'(pg)}, 1'b0));
        end
        ops.push_back(mk(K_MEASURE, '0, 1'b1));
      end else begin
        for (int i = 0; i < 200; i++) ops.push_back(mk(K_PROBE, rand_vpn(), 1'b0));
      end

      while (ops.size() > 0) begin
        automatic op_t o = ops.pop_front();
        if (o.kind == K_MEASURE) begin
          m.keys(q);
          m.m_total = 0; m.m_count = 0;
          foreach (q[i]) ops.push_back(mk(K_PROBE, q[i], 1'b1));
          ops.push_back(mk(K_MEASURE, '0, ~o.flag));   // report marker
          o.kind = K_MEASURE;
        end
        if (o.kind == K_MEASURE && m.m_count > 0) begin
          automatic real mean = real'(m.m_total) / real'(m.m_count);
          $display("workload %s: %0d pages in %0d cells, mean search length %0.4f (1 + a/2 = %0.4f)",
                   o.flag ? "uniform random" : "address-space clustered", m.m_count, 2**CELL_AW,
                   mean, 1.0 + real'(m.m_count) / real'(2**CELL_AW) / 2.0);
          m.check(m.m_count == NFRAMES, "every page frame holds a page");
          m.check(mean >= 1.0 && mean < 1.2, "mean search length near 1.125");
          ops.delete();
        end else if (o.kind == K_PROBE) begin
          automatic logic [PAGE_W-1:0] off = PAGE_W'($urandom);
          automatic bit wr = (mode >= 2) ? 1'b0 : o.flag;
          int cycles;
          @(negedge clk);
          req_valid = 1'b1; req_va = {o.v, off}; req_write = wr;
          while (!req_ready) @(negedge clk);
          @(negedge clk);
          req_valid = 1'b0;
          cycles = 1;
          while (!resp_valid) begin @(negedge clk); cycles++; end
          m.after_translate(o.v, off, wr, cycles, resp_hit, resp_fault, resp_prot,
                            resp_pa, int'(resp_probes), resp_va, mode == 2 || mode == 3);
        end else if (o.kind != K_MEASURE) begin
          automatic bit   ins = (o.kind != K_DISCARD);
          automatic vpn_t v   = (o.kind == K_LOAD_AT_LAST_CELL) ? vpn_t'(last_cell) : o.v;
          automatic bit   was = m.pages.exists(v);
          automatic int   nb  = (was || !ins) ? 0 : m.same_home(v);
          automatic int   f   = (was || !ins) ? 0 : m.free_frame();
          automatic logic [CELL_AW-1:0] prev = last_cell;
          if (!(ins && !was && m.pages.num() >= NFRAMES)) begin
            @(negedge clk);
            cmd_valid = 1'b1; cmd_op = ins ? OP_INSERT : OP_DELETE; cmd_vpn = v;
            cmd_frame = FRAME_W'(f); cmd_ro = o.flag;
            while (!cmd_ready) @(negedge clk);
            @(negedge clk);
            cmd_valid = 1'b0;
            while (!done_valid) @(negedge clk);
            if (ins) m.after_insert(v, o.flag, f, nb, was, done_status, done_cell, int'(occupancy));
            else m.after_delete(v, done_status, int'(occupancy));
            last_cell = done_cell;
            if (o.kind == K_LOAD_AT_LAST_CELL) begin
              m.check(m.home_of(v) == prev, "page number below 2^13 is its own home");
              m.check(done_cell == prev, "page takes its home back from an overflow entry");
            end
          end
        end
      end
    end

    // back-to-back translations of 16 lone pages
    begin
      vpn_t vs[$];
      automatic int got = 0, start, stop;
      m.keys(q);
      foreach (q[i]) if (m.same_home(q[i]) == 1 && vs.size() < 16) vs.push_back(q[i]);
      @(negedge clk);
      start = int'($time / 10);
      for (int i = 0; i < 16; i++) begin
        req_valid = 1'b1; req_va = {vs[i], 12'habc}; req_write = 1'b0;
        while (!req_ready) @(negedge clk);
        @(negedge clk);
        if (resp_valid) begin
          m.check(resp_hit && resp_pa == {m.pages[vs[i]][FRAME_W-1:0], 12'habc}, "streamed hit");
          got++;
        end
      end
      req_valid = 1'b0;
      stop = int'($time / 10);
      m.check(got == 16, "every streamed translation answered");
      m.check(stop - start == 16, $sformatf("16 head hits in 16 cycles (took %0d)", stop - start));
    end

    $display("mechanisms: head hits %0d, chain hits %0d, faults %0d (after a chain %0d), protection %0d, back-to-back %0d",
             m.n_head_hit, m.n_chain_hit, m.n_fault, m.n_chain_fault, m.n_prot, n_b2b);
    $display("            insert home %0d, append %0d, relocate %0d, duplicate %0d; delete lone %0d, head %0d, middle %0d, not found %0d",
             m.n_ins_home, m.n_ins_append, n_reloc, m.n_dup, m.n_del_lone, n_del_head, n_del_mid, m.n_not_found);
    m.check(m.n_head_hit > 0, "head hit happened");
    m.check(m.n_chain_hit > 0, "chain hit happened");
    m.check(m.n_fault > 0, "page fault happened");
    m.check(m.n_chain_fault > 0, "page fault after a chain happened");
    m.check(m.n_prot > 0, "protection fault happened");
    m.check(n_b2b > 0, "back-to-back translation happened");
    m.check(m.n_ins_home > 0, "insert at home happened");
    m.check(m.n_ins_append > 0, "insert into overflow happened");
    m.check(n_reloc > 0, "relocation of a borrowed home happened");
    m.check(m.n_dup > 0, "duplicate insert happened");
    m.check(m.n_del_lone > 0, "delete of a lone head happened");
    m.check(n_del_head > 0, "delete of a head with successor happened");
    m.check(n_del_mid > 0, "delete inside a chain happened");
    m.check(m.n_not_found > 0, "delete of a missing page happened");

    $display("TB_RESULT checks=%0d failures=%0d", m.checks, m.failures);
    $finish;
  end

endmodule
