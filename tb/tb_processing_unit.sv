// tb_processing_unit: checks one processing unit with RRR = 3 against
// queues, a key buffer and a Tag FIFO modelled in the testbench.
//   A: eight RM and eight KE tasks all ready from the start must run as the
//      turn sequence R R R K R R R K R R K K K K K K, back to back, two
//      cycles per turn (32 cycles), with the right slot keys and tags;
//   B: RM tasks wait while the key of the RM head is not valid even if a
//      later packet's key is, and then run in order, clearing the units;
//   C: a full Tag FIFO holds every turn back.
module tb_processing_unit;
  import dppc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            rm_empty, rm_pop, ke_empty, ke_pop, kb_clr, tag_full = 1'b0, tag_push;
  rm_entry_t       rm_head;
  ke_entry_t       ke_head;
  logic [SN_W-1:0] kb_rd_addr;
  kb_entry_t       kb_rd_data;
  tag_t            tag_din;
  tcam_cmd_t       tcam_cmd;
  logic            ke_prio, rm_blocked;

  processing_unit #(.RM_DEPTH(8), .RRR(3)) dut (.*);

  rm_entry_t  rmq [$];
  ke_entry_t  keq [$];
  bit         kb_v [8];
  logic [7:0] kb_s [8], kb_d [8];
  tag_t       tags [$];

  assign rm_empty = (rmq.size() == 0);
  assign ke_empty = (keq.size() == 0);
  assign rm_head  = (rmq.size() != 0) ? rmq[0] : '0;
  assign ke_head  = (keq.size() != 0) ? keq[0] : '0;
  assign kb_rd_data = '{valid: kb_v[kb_rd_addr[2:0]], dpk: kb_d[kb_rd_addr[2:0]], spk: kb_s[kb_rd_addr[2:0]]};

  // the modelled queues change just after the edge, like registers
  always @(posedge clk) begin
    if (rst_n) begin
      bit tp, kc, rp, kp; tag_t td; logic [2:0] ka;
      tp = tag_push; td = tag_din; kc = kb_clr; ka = kb_rd_addr[2:0]; rp = rm_pop; kp = ke_pop;
      #1;
      if (tp) tags.push_back(td);
      if (kc) kb_v[ka] = 0;
      if (rp) void'(rmq.pop_front());
      if (kp) void'(keq.pop_front());
    end
  end

  // command log
  tcam_op_e    ops [$];
  logic [63:0] keys [$];
  int          cyc [$];
  int cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && tcam_cmd.valid) begin
      ops.push_back(tcam_cmd.op); keys.push_back(tcam_cmd.key); cyc.push_back(cycle);
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rm_entry_t rms [8];
    ke_entry_t kes [8];
    string seq;
    int ri, ki;
    for (int a = 0; a < 8; a++) kb_v[a] = 0;
    repeat (3) @(posedge clk);
    // ---- A: weighted round robin ----
    for (int i = 0; i < 8; i++) begin
      rms[i] = rm_entry_t'({$urandom(), $urandom(), $urandom(), $urandom()});
      rms[i].tag = '{camid: 3'd2, sn: 5'((i + 1) % 8)};
      kes[i] = ke_entry_t'({$urandom(), 8'($urandom())});
      kb_v[(i + 1) % 8] = 1; kb_s[(i + 1) % 8] = 8'($urandom()); kb_d[(i + 1) % 8] = 8'($urandom());
      rmq.push_back(rms[i]); keq.push_back(kes[i]);
    end
    @(negedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    check(ops.size() == 32, $sformatf("A: %0d accesses, want 32", ops.size()));
    check(cyc.size() == 32 && cyc[31] - cyc[0] == 31, "A: turns not back to back");
    seq = "";
    ri = 0; ki = 0;
    for (int t = 0; t < 16 && 2 * t + 1 < ops.size(); t++) begin
      if (ops[2*t] == OP_RM1) begin
        logic [127:0] sk;
        seq = {seq, "R"};
        sk = {rms[ri].sip, rms[ri].dip, rms[ri].sport, rms[ri].dport, rms[ri].prot,
              kb_s[rms[ri].tag.sn], kb_d[rms[ri].tag.sn], 8'h00};
        check(ops[2*t+1] == OP_RM2 && keys[2*t] == sk[127:64] && keys[2*t+1] == sk[63:0],
              $sformatf("A: RM turn %0d slot keys", t));
        check(tags[t] == rms[ri].tag, $sformatf("A: tag of turn %0d", t));
        ri++;
      end else begin
        seq = {seq, "K"};
        check(ops[2*t] == OP_KE_SP && ops[2*t+1] == OP_KE_DP &&
              keys[2*t][15:0] == kes[ki].sport && keys[2*t+1][15:0] == kes[ki].dport,
              $sformatf("A: KE turn %0d", t));
        check(tags[t] == kes[ki].tag, $sformatf("A: tag of KE turn %0d", t));
        ki++;
      end
    end
    check(seq == "RRRKRRRKRRKKKKKK", {"A: turn order ", seq});
    for (int a = 0; a < 8; a++) check(!kb_v[a], "A: key buffer unit not cleared");

    // ---- B: ordered processing ----
    ops.delete(); keys.delete(); cyc.delete(); tags.delete();
    rms[0].tag.sn = 5'd1; rms[1].tag.sn = 5'd2;
    rmq.push_back(rms[0]); rmq.push_back(rms[1]);
    kb_v[2] = 1;
    repeat (10) @(negedge clk);
    check(ops.size() == 0, "B: RM issued before its key was valid");
    check(rm_blocked, "B: rm_blocked not raised");
    kb_v[1] = 1;
    repeat (10) @(negedge clk);
    check(ops.size() == 4 && tags.size() == 2 && tags[0].sn == 1 && tags[1].sn == 2,
          "B: the two RM tasks did not run in order");
    check(!kb_v[1] && !kb_v[2], "B: units not cleared");

    // ---- C: Tag FIFO full ----
    ops.delete();
    tag_full = 1'b1;
    keq.push_back(kes[0]);
    rms[2].tag.sn = 5'd3; rmq.push_back(rms[2]); kb_v[3] = 1;
    repeat (10) @(negedge clk);
    check(ops.size() == 0, "C: turn issued while the Tag FIFO was full");
    tag_full = 1'b0;
    repeat (10) @(negedge clk);
    check(ops.size() == 4, "C: work not resumed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
