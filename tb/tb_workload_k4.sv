// tb_workload_k4: the four-TCAM configuration, run as a workload. The
// Key-ID map is the four-TCAM load-first table (TCAM 1: groups 2, 15, 13, 0;
// TCAM 2: 12, 8, 9, 11; TCAM 3: 6, 5, 3, 14; TCAM 4: 7, 10, 4, 1). With four
// TCAMs the lookup capacity equals the back-to-back packet rate exactly
// (4 lookups per packet), so this is the case where the choice of KE policy
// shows: traffic is offered back to back, uniform over the Key-IDs and
// uneven, under full adaptation and stagger round robin, and the table is
// not rebuilt when the pattern changes.
//
// Everything else follows the five-TCAM end-to-end test: the same random
// rule set, range encoding and reference first-match search; every result
// is checked for tag, hit, rule and order; the example packet's latency
// must be 10 cycles and light load must not drop anything. The throughput
// ratios are printed, random arrivals at 90 % intensity are run too, and
// full adaptation must do at least as well as
// stagger round robin, reach the ratio checked below and show a smaller
// spread of delays (standard deviation) under back-to-back traffic.
module tb_workload_k4;
  import dppc_pkg::*;

  localparam int K   = 4;
  localparam int LAT = 2;
  localparam int NR  = 48;     // rules
  localparam int NRT = 16;     // range table entries per TCAM
  localparam int RM_DEPTH = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  five_tuple_t in_tuple = '0;
  logic        in_drop;
  npu_res_t    npu_res [K];
  ke_mode_e    ke_mode = KE_FA;
  logic        tbl_we = 1'b0;
  logic [3:0]  tbl_addr = '0;
  logic [2:0]  tbl_camid = '0;
  tcam_cmd_t   tcam_cmd [K];
  tcam_res_t   tcam_res [K];

  logic [K-1:0] prog_we = '0;
  logic         prog_clear = 1'b0;
  logic [1:0]   prog_sel = '0;
  int unsigned  prog_idx = 0;
  logic [127:0] prog_val = '0, prog_msk = '0;
  logic [15:0]  prog_data = '0;

  always #5 clk = ~clk;

  dppc_re_top #(
    .K(4),
    .ID_MAP({3'd1, 3'd3, 3'd1, 3'd2, 3'd2, 3'd4, 3'd2, 3'd2,
             3'd4, 3'd3, 3'd3, 3'd4, 3'd3, 3'd1, 3'd4, 3'd1})
  ) dut (
    .clk, .rst_n, .in_valid, .in_tuple, .in_drop, .npu_res,
    .ke_mode, .tbl_we, .tbl_addr, .tbl_camid, .tcam_cmd, .tcam_res
  );

  for (genvar k = 0; k < K; k++) begin : g_tcam
    tcam_model #(.N_RULES(NR), .N_RANGE(NRT), .LAT(LAT)) u_tcam (
      .clk, .cmd(tcam_cmd[k]), .res(tcam_res[k]),
      .prog_we(prog_we[k]), .prog_sel, .prog_idx, .prog_val, .prog_msk,
      .prog_data, .prog_clear
    );
  end

  // ---------------- reference data ----------------
  // Key-ID -> TCAM (1-based) of the four-TCAM load-first table.
  int map4 [16] = '{1, 4, 1, 3, 4, 3, 3, 4, 2, 2, 4, 2, 2, 1, 3, 1};

  int sp_lo [4] = '{1024, 0, 4096, 256};
  int sp_hi [4] = '{65535, 1023, 8191, 511};
  int dp_lo [5] = '{256, 512, 1024, 80, 0};
  int dp_hi [5] = '{512, 1023, 65535, 80, 1023};

  typedef struct {
    logic [31:0] sip, sip_m, dip, dip_m;
    logic [7:0]  prot, prot_m;
    int          sr, dr;
  } rule_t;
  rule_t rules [NR];

  function automatic logic [3:0] kid(five_tuple_t t);
    return {t.sip[28], t.dip[11], t.dip[31], t.prot[3]};
  endfunction

  function automatic bit in_group(rule_t r, int i);
    if (r.prot_m[3] && (r.prot[3]  != i[0])) return 0;
    if (r.dip_m[31] && (r.dip[31]  != i[1])) return 0;
    if (r.dip_m[11] && (r.dip[11]  != i[2])) return 0;
    if (r.sip_m[28] && (r.sip[28]  != i[3])) return 0;
    return 1;
  endfunction

  function automatic int golden(five_tuple_t t);
    for (int r = 0; r < NR; r++) begin
      if (((t.sip ^ rules[r].sip) & rules[r].sip_m) != 0) continue;
      if (((t.dip ^ rules[r].dip) & rules[r].dip_m) != 0) continue;
      if (((t.prot ^ rules[r].prot) & rules[r].prot_m) != 0) continue;
      if (rules[r].sr >= 0 && (int'(t.sport) < sp_lo[rules[r].sr] || int'(t.sport) > sp_hi[rules[r].sr])) continue;
      if (rules[r].dr >= 0 && (int'(t.dport) < dp_lo[rules[r].dr] || int'(t.dport) > dp_hi[rules[r].dr])) continue;
      return r;
    end
    return -1;
  endfunction

  function automatic logic [31:0] pmask(int len);
    return (len == 0) ? 32'h0 : ~((32'h1 << (32 - len)) - 1);
  endfunction

  // ---------------- programming ----------------
  task automatic prog(logic [K-1:0] we, logic [1:0] sel, int idx,
                      logic [127:0] v, logic [127:0] m, logic [15:0] d);
    @(negedge clk);
    prog_we = we; prog_sel = sel; prog_idx = idx; prog_val = v; prog_msk = m; prog_data = d;
    @(negedge clk);
    prog_we = '0;
  endtask

  // Split every range of one port field into prefixes and load them,
  // longest prefix first, into the range table of every TCAM.
  task automatic load_ranges(logic [1:0] sel, int lo [], int hi []);
    int plo [64]; int plen [64]; int np; int idx;
    np = 0;
    foreach (lo[r]) begin
      int a; a = lo[r];
      while (a <= hi[r]) begin
        int s; s = 0;
        while (s < 16 && (a % (1 << (s + 1))) == 0 && a + (1 << (s + 1)) - 1 <= hi[r]) s++;
        plo[np] = a; plen[np] = 16 - s; np++;
        a += (1 << s);
      end
    end
    idx = 0;
    for (int len = 16; len >= 0; len--) begin
      for (int p = 0; p < np; p++) begin
        if (plen[p] == len) begin
          logic [7:0] code; logic [15:0] m; int phi;
          phi = plo[p] + (1 << (16 - len)) - 1;
          code = '0;
          foreach (lo[r]) if (lo[r] <= plo[p] && phi <= hi[r]) code[r] = 1'b1;
          m = (len == 0) ? 16'h0 : 16'(~((32'h1 << (16 - len)) - 1));
          prog('1, sel, idx, 128'(plo[p]), 128'(m), 16'(code));
          idx++;
        end
      end
    end
    if (idx > NRT) $fatal(1, "range table overflow");
  endtask

  task automatic build_rules();
    int len_opts [4] = '{0, 8, 16, 24};
    int cnt [K];
    for (int k = 0; k < K; k++) cnt[k] = 0;
    for (int r = 0; r < NR; r++) begin
      int l;
      l = len_opts[$urandom_range(0, 3)];
      rules[r].sip_m = pmask(l); rules[r].sip = $urandom() & pmask(l);
      l = len_opts[$urandom_range(0, 3)];
      rules[r].dip_m = pmask(l); rules[r].dip = $urandom() & pmask(l);
      case ($urandom_range(0, 2))
        0: begin rules[r].prot = 8'd6;  rules[r].prot_m = 8'hFF; end
        1: begin rules[r].prot = 8'd11; rules[r].prot_m = 8'hFF; end
        default: begin rules[r].prot = 8'd0; rules[r].prot_m = 8'h00; end
      endcase
      rules[r].sr = $urandom_range(0, 4) - 1;
      rules[r].dr = $urandom_range(0, 5) - 1;
    end
    for (int r = 0; r < NR; r++) begin
      logic [127:0] v, m;
      v = {rules[r].sip, rules[r].dip, 16'h0, 16'h0, rules[r].prot, 8'h0, 8'h0, 8'h0};
      m = {rules[r].sip_m, rules[r].dip_m, 16'h0, 16'h0, rules[r].prot_m, 8'h0, 8'h0, 8'h0};
      if (rules[r].sr >= 0) begin v[16 + rules[r].sr] = 1'b1; m[16 + rules[r].sr] = 1'b1; end
      if (rules[r].dr >= 0) begin v[8 + rules[r].dr]  = 1'b1; m[8 + rules[r].dr]  = 1'b1; end
      for (int k = 0; k < K; k++) begin
        bit need; need = 0;
        for (int i = 0; i < 16; i++) if (map4[i] == k + 1 && in_group(rules[r], i)) need = 1;
        if (need) begin
          prog(K'(1) << k, 2'd0, cnt[k], v, m, 16'(r));
          cnt[k]++;
        end
      end
    end
  endtask

  // ---------------- traffic ----------------
  int sp_pick [8] = '{0, 80, 300, 1023, 1024, 5000, 8191, 40000};
  int dp_pick [8] = '{80, 256, 511, 512, 700, 1023, 1024, 65535};

  // Uneven traffic over the Key-ID groups, in 0.1 % units: each TCAM's share
  // equals the per-TCAM load of the five-TCAM table (18.8, 20.0, 29.4, 11.8
  // and 20.0 %), split evenly over the groups that TCAM holds.
  int w_uneven [16] = '{62, 66, 63, 39, 66, 67, 67, 67, 67, 40, 74, 63, 73, 39, 73, 74};
  int pattern = 0;   // 0 uniform Key-IDs, 1 uneven

  function automatic five_tuple_t rand_tuple();
    five_tuple_t t;
    t.sip = $urandom(); t.dip = $urandom();
    t.sport = ($urandom_range(0, 1) == 0) ? 16'(sp_pick[$urandom_range(0, 7)]) : 16'($urandom());
    t.dport = ($urandom_range(0, 1) == 0) ? 16'(dp_pick[$urandom_range(0, 7)]) : 16'($urandom());
    case ($urandom_range(0, 3))
      0, 1: t.prot = 8'd6;
      2: t.prot = 8'd11;
      default: t.prot = 8'($urandom());
    endcase
    // half of the packets are aimed inside a rule's address prefixes
    if ($urandom_range(0, 1) == 0) begin
      int r; r = $urandom_range(0, NR - 1);
      t.sip = (t.sip & ~rules[r].sip_m) | rules[r].sip;
      t.dip = (t.dip & ~rules[r].dip_m) | rules[r].dip;
      if (rules[r].prot_m != 0) t.prot = rules[r].prot;
    end
    if (pattern == 1) begin
      int x, id;
      x = $urandom_range(0, 999); id = 0;
      while (x >= w_uneven[id]) begin x -= w_uneven[id]; id++; end
      t.prot[3] = id[0]; t.dip[31] = id[1]; t.dip[11] = id[2]; t.sip[28] = id[3];
    end
    return t;
  endfunction

  typedef struct {
    tag_t tag;
    bit   hit;
    int   rule;
    int   t_in;
  } exp_t;
  exp_t expq [K][$];
  int   sn_model [K];

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_sent = 0, n_acc = 0, n_drop = 0, n_done = 0;
  int lat_min = 1 << 30, lat_sum = 0, lat_max = 0;
  longint lat_sq = 0;
  real last_sd;   // delay standard deviation of the last burst
  int n_hit = 0, n_miss = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // record each accepted packet
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      n_sent++;
      if (in_drop) n_drop++;
      else begin
        exp_t e; int c; int g;
        c = map4[kid(in_tuple)];
        sn_model[c-1] = (sn_model[c-1] + 1) % RM_DEPTH;
        g = golden(in_tuple);
        e.tag = '{camid: 3'(c), sn: 5'(sn_model[c-1])};
        e.hit = (g >= 0);
        e.rule = (g >= 0) ? g : 0;
        e.t_in = cycle;
        expq[c-1].push_back(e);
        n_acc++;
      end
    end
  end

  // check each result against the reference, in per-TCAM order
  always @(posedge clk) begin
    for (int k = 0; k < K; k++) begin
      if (rst_n && npu_res[k].valid) begin
        checks++;
        if (expq[k].size() == 0) begin
          failures++;
          $display("FAIL: unexpected result on TCAM %0d", k + 1);
        end else begin
          exp_t e; e = expq[k].pop_front();
          if (npu_res[k].tag != e.tag || npu_res[k].hit != e.hit ||
              (e.hit && int'(npu_res[k].data) != e.rule)) begin
            failures++;
            $display("FAIL: TCAM %0d tag %h/%h hit %0d/%0d rule %0d/%0d", k + 1,
                     npu_res[k].tag, e.tag, npu_res[k].hit, e.hit, npu_res[k].data, e.rule);
          end
          if (e.hit) n_hit++; else n_miss++;
          n_done++;
          lat_sum += cycle - e.t_in;
          lat_sq  += longint'(cycle - e.t_in) * longint'(cycle - e.t_in);
          if (cycle - e.t_in > lat_max) lat_max = cycle - e.t_in;
          if (cycle - e.t_in < lat_min) lat_min = cycle - e.t_in;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_fa_other = 0, n_srr_other = 0, n_ke_prio_turn = 0, n_rm_wait = 0;
  int n_ooo_ke = 0, n_tag_stall = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid && !in_drop && dut.rm_sel != dut.ke_sel) begin
      if (ke_mode == KE_FA) n_fa_other++; else n_srr_other++;
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        // a KE turn taken over a ready RM task because KE had priority
        if (dut.g_cam[k].u_pu.issue_ke && dut.g_cam[k].u_pu.ke_prio &&
            !dut.g_cam[k].u_pu.rm_empty && dut.g_cam[k].u_pu.kb_rd_data.valid)
          n_ke_prio_turn++;
        if (!dut.g_cam[k].u_pu.busy && dut.g_cam[k].u_pu.rm_blocked) n_rm_wait++;
        if (!dut.g_cam[k].u_pu.busy && dut.tag_full[k] &&
            !(dut.rm_empty[k] && dut.ke_empty[k])) n_tag_stall++;
        // key encoding finished for a packet that is not at the RM head
        for (int s = 0; s < K; s++)
          if (dut.kb_we[k][s] && dut.kb_waddr[s] != dut.kb_rd_addr[k]) n_ooo_ke++;
      end
    end
  end

  // ---------------- helpers ----------------
  task automatic send(five_tuple_t t);
    @(negedge clk);
    in_valid = 1'b1; in_tuple = t;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    int guard; guard = 0;
    while (guard < 2000) begin
      bit busy; busy = 0;
      for (int k = 0; k < K; k++) if (expq[k].size() != 0) busy = 1;
      if (!busy) break;
      @(posedge clk); guard++;
    end
    repeat (20) @(posedge clk);
    checks++;
    for (int k = 0; k < K; k++)
      if (expq[k].size() != 0) begin
        failures++;
        $display("FAIL: %0d results missing on TCAM %0d", expq[k].size(), k + 1);
      end
  endtask

  // Standard deviation of the delays of the packets finished since the
  // counters held d0, l0 and q0.
  task automatic delay_stats(int d0, int l0, longint q0);
    real m, v;
    m = real'(lat_sum - l0) / real'(n_done - d0);
    v = real'(lat_sq - q0) / real'(n_done - d0) - m * m;
    last_sd = (v > 0.0) ? $sqrt(v) : 0.0;
  endtask

  task automatic burst(int n, int gap, output real ratio);
    int s0, a0, d0, l0;
    longint q0;
    s0 = n_sent; a0 = n_acc; d0 = n_done; l0 = lat_sum; q0 = lat_sq; lat_max = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1'b1; in_tuple = rand_tuple();
      repeat (gap) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    drain();
    ratio = real'(n_acc - a0) / real'(n_sent - s0);
    delay_stats(d0, l0, q0);
    $display("%0d packets, gap %0d, %s, pattern %0d: ratio %0.4f, mean delay %0.2f cycles, std dev %0.2f, max %0d",
             n, gap, ke_mode.name(), pattern, ratio, real'(lat_sum - l0) / real'(n_done - d0),
             last_sd, lat_max);
  endtask

  // Random arrivals: a packet in each cycle with probability pct/100, an
  // approximation of Poisson arrivals at traffic intensity pct %.
  task automatic burst_rand(int n, int pct, output real ratio, output real delay);
    int s0, a0, d0, l0;
    longint q0;
    s0 = n_sent; a0 = n_acc; d0 = n_done; l0 = lat_sum; q0 = lat_sq; lat_max = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < pct);
      in_tuple = rand_tuple();
    end
    @(negedge clk);
    in_valid = 1'b0;
    drain();
    ratio = real'(n_acc - a0) / real'(n_sent - s0);
    delay = real'(lat_sum - l0) / real'(n_done - d0);
    delay_stats(d0, l0, q0);
    $display("%0d packets, random %0d %%, %s: ratio %0.4f, mean delay %0.2f cycles, std dev %0.2f, max %0d",
             n, pct, ke_mode.name(), ratio, delay, last_sd, lat_max);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    five_tuple_t p0;
    real r_fa_light, r_fa, r_srr, r_fa_u, r_srr_u, r_fa_p, r_srr_p, d_fa_p, d_srr_p, sd_fa, sd_srr;
    for (int k = 0; k < K; k++) sn_model[k] = 0;
    void'($urandom(7));
    prog_clear = 1'b1;
    repeat (10) @(posedge clk);
    prog_clear = 1'b0;
    rst_n = 1'b1;

    load_ranges(2'd1, sp_lo, sp_hi);
    load_ranges(2'd2, dp_lo, dp_hi);
    build_rules();

    // --- worked example packet: <166.111.140.1, 202.205.4.3, 15335, 80, 6>
    p0 = '{sip: {8'd166, 8'd111, 8'd140, 8'd1}, dip: {8'd202, 8'd205, 8'd4, 8'd3},
           sport: 16'd15335, dport: 16'd80, prot: 8'd6};
    @(negedge clk);
    in_valid = 1'b1; in_tuple = p0;
    #1;
    checks++;
    if (dut.key_id != 4'b0010 || dut.rm_sel != 0 || dut.u_dist.rm_data.tag != 8'b001_00001) begin
      failures++;
      $display("FAIL: example Key-ID %b TCAM %0d tag %b", dut.key_id, dut.rm_sel + 1,
               dut.u_dist.rm_data.tag);
    end
    @(negedge clk);
    in_valid = 1'b0;
    drain();
    checks++;
    if (lat_min != 10) begin
      failures++;
      $display("FAIL: minimum latency %0d cycles, expected 10", lat_min);
    end
    $display("example packet: latency %0d cycles", lat_min);

    // --- light load, full adaptation: nothing may be dropped
    ke_mode = KE_FA;
    burst(400, 3, r_fa_light);
    checks++;
    if (n_drop != 0) begin
      failures++;
      $display("FAIL: %0d drops under light load", n_drop);
    end

    // --- back-to-back, full adaptation
    burst(4000, 0, r_fa);
    sd_fa = last_sd;
    // --- back-to-back, stagger round robin
    ke_mode = KE_SRR;
    burst(4000, 0, r_srr);
    sd_srr = last_sd;

    // --- uneven traffic pattern, both KE policies
    pattern = 1;
    ke_mode = KE_FA;
    burst(4000, 0, r_fa_u);
    ke_mode = KE_SRR;
    burst(4000, 0, r_srr_u);
    pattern = 0;

    // --- random arrivals at 90 % traffic intensity, both policies
    ke_mode = KE_FA;
    burst_rand(4000, 90, r_fa_p, d_fa_p);
    ke_mode = KE_SRR;
    burst_rand(4000, 90, r_srr_p, d_srr_p);
    $display("random arrivals at 90 %%: FA ratio %0.4f delay %0.2f, SRR ratio %0.4f delay %0.2f",
             r_fa_p, d_fa_p, r_srr_p, d_srr_p);
    checks++;
    if (r_fa_p < 0.98 || d_fa_p > d_srr_p + 0.5) begin
      failures++;
      $display("FAIL: FA at 90 %% intensity: ratio %0.4f delay %0.2f", r_fa_p, d_fa_p);
    end

    $display("throughput ratio: FA light %0.4f, FA back-to-back %0.4f, SRR back-to-back %0.4f",
             r_fa_light, r_fa, r_srr);
    $display("uneven pattern: FA %0.4f, SRR %0.4f", r_fa_u, r_srr_u);
    checks++;
    if (r_fa_u < 0.95 || r_fa_u < r_srr_u) begin
      failures++;
      $display("FAIL: FA under uneven traffic %0.4f (SRR %0.4f)", r_fa_u, r_srr_u);
    end
    $display("avg latency %0.2f cycles, hits %0d misses %0d", real'(lat_sum) / real'(n_done),
             n_hit, n_miss);
    checks++;
    if (r_fa < 0.95) begin
      failures++;
      $display("FAIL: FA back-to-back throughput ratio %0.4f below 0.95", r_fa);
    end
    checks++;
    if (r_fa - r_srr < 0.03) begin
      failures++;
      $display("FAIL: with four TCAMs SRR should fall clearly behind FA");
    end
    checks++;
    if (r_fa < r_srr) begin
      failures++;
      $display("FAIL: FA below SRR");
    end
    // full adaptation's delays must be more concentrated than stagger round robin's
    checks++;
    if (sd_fa >= sd_srr) begin
      failures++;
      $display("FAIL: delay spread FA %0.2f not below SRR %0.2f", sd_fa, sd_srr);
    end

    $display("mechanisms: FA-other %0d SRR-other %0d drops %0d KE-priority turns %0d RM waits %0d out-of-order KE %0d tag stalls %0d",
             n_fa_other, n_srr_other, n_drop, n_ke_prio_turn, n_rm_wait, n_ooo_ke, n_tag_stall);
    checks += 6;
    if (n_fa_other == 0)     begin failures++; $display("FAIL: FA never used another TCAM"); end
    if (n_srr_other == 0)    begin failures++; $display("FAIL: SRR never dispatched"); end
    if (n_drop == 0)         begin failures++; $display("FAIL: no drop seen"); end
    if (n_ke_prio_turn == 0) begin failures++; $display("FAIL: no KE-priority turn"); end
    if (n_rm_wait == 0)      begin failures++; $display("FAIL: RM never waited for its key"); end
    if (n_ooo_ke == 0)       begin failures++; $display("FAIL: no out-of-order key encoding"); end
    checks++;
    if (n_hit == 0 || n_miss == 0) begin failures++; $display("FAIL: hits/misses not both seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
