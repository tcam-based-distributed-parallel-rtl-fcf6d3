// tb_mapper: drives random result streams from five TCAMs into the mapper:
// idle cycles, single RM results, and KE phase I / phase II pairs on
// consecutive cycles. The Tag FIFOs are modelled in the testbench and filled
// with random tags. One cycle after each RM result the network-processor
// output of that TCAM must carry the result with the head tag; one cycle
// after each phase II result the key buffer named by the tag's CAMID must
// receive a write from that TCAM at the tag's S/N with both codes. No other
// write or output may appear, and each Tag FIFO must be popped exactly once
// per RM or phase II result.
module tb_mapper;
  import dppc_pkg::*;

  localparam int K = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tcam_res_t         tcam_res [K];
  tag_t              tag_head [K];
  logic [K-1:0]      tag_empty, tag_pop;
  logic [K-1:0]      kb_we [K];
  logic [SN_W-1:0]   kb_waddr [K];
  logic [CODE_W-1:0] kb_wspk [K], kb_wdpk [K];
  npu_res_t          npu_res [K];

  mapper #(.K(K)) dut (.*);

  tag_t tq [K][$];
  for (genvar s = 0; s < K; s++) begin : g_tag
    assign tag_empty[s] = (tq[s].size() == 0);
    assign tag_head[s]  = (tq[s].size() != 0) ? tq[s][0] : '0;
  end

  int checks = 0, failures = 0, n_rm = 0, n_ke = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-source plan of the next cycle: 0 idle, 1 RM, 2 KE phase I, 3 phase II
  int        state [K];
  logic [7:0] sp_code [K];
  // expectations for the cycle after an edge
  bit        exp_rm [K], exp_kb [K];
  npu_res_t  exp_res [K];
  int        exp_cam [K];
  logic [4:0] exp_sn [K];
  logic [7:0] exp_spk [K], exp_dpk [K];

  initial begin
    for (int s = 0; s < K; s++) begin
      state[s] = 0; exp_rm[s] = 0; exp_kb[s] = 0;
      tcam_res[s] = '{rtype: RES_NONE, hit: 1'b0, data: '0};
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // outputs caused by the previous edge
      for (int s = 0; s < K; s++) begin
        check(npu_res[s].valid == exp_rm[s], $sformatf("cycle %0d src %0d npu valid", i, s));
        if (exp_rm[s])
          check(npu_res[s] == exp_res[s], $sformatf("cycle %0d src %0d npu result", i, s));
        for (int c = 0; c < K; c++)
          check(kb_we[c][s] == (exp_kb[s] && exp_cam[s] == c + 1),
                $sformatf("cycle %0d key buffer %0d write from %0d", i, c + 1, s));
        if (exp_kb[s])
          check(kb_waddr[s] == exp_sn[s] && kb_wspk[s] == exp_spk[s] && kb_wdpk[s] == exp_dpk[s],
                $sformatf("cycle %0d src %0d key buffer data", i, s));
      end
      // next results
      for (int s = 0; s < K; s++) begin
        exp_rm[s] = 0; exp_kb[s] = 0;
        if (state[s] == 3) begin
          tcam_res[s] = '{rtype: RES_KE2, hit: 1'b1, data: 16'($urandom_range(0, 255))};
        end else begin
          case ($urandom_range(0, 2))
            0: state[s] = 0;
            1: state[s] = 1;
            default: state[s] = 2;
          endcase
          if (state[s] == 1) tcam_res[s] = '{rtype: RES_RM, hit: 1'($urandom()), data: 16'($urandom())};
          else if (state[s] == 2) tcam_res[s] = '{rtype: RES_KE1, hit: 1'b1, data: 16'($urandom_range(0, 255))};
          else tcam_res[s] = '{rtype: RES_NONE, hit: 1'b0, data: '0};
        end
        if (state[s] == 1 || state[s] == 3)
          tq[s].push_back('{camid: 3'($urandom_range(1, K)), sn: 5'($urandom_range(0, 7))});
      end
      #1;
      for (int s = 0; s < K; s++) begin
        check(tag_pop[s] == (state[s] == 1 || state[s] == 3), $sformatf("cycle %0d src %0d tag pop", i, s));
        if (state[s] == 1) begin
          exp_rm[s] = 1;
          exp_res[s] = '{valid: 1'b1, tag: tq[s][0], hit: tcam_res[s].hit, data: tcam_res[s].data};
          n_rm++;
        end else if (state[s] == 2) begin
          sp_code[s] = tcam_res[s].data[7:0];
        end else if (state[s] == 3) begin
          exp_kb[s] = 1; exp_cam[s] = tq[s][0].camid; exp_sn[s] = tq[s][0].sn;
          exp_spk[s] = sp_code[s]; exp_dpk[s] = tcam_res[s].data[7:0];
          n_ke++;
        end
      end
      @(posedge clk);
      #1;
      for (int s = 0; s < K; s++) begin
        if (state[s] == 1 || state[s] == 3) void'(tq[s].pop_front());
        if (state[s] == 2) state[s] = 3;
        else if (state[s] == 3) state[s] = 0;
      end
    end
    check(n_rm > 0 && n_ke > 0, "both result kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
