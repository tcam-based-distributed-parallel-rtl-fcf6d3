// tcam_model: behavioural model of one TCAM chip together with its
// associated SRAM, for simulation only (not synthesizable intent; the real
// parts are commercial chips).
//
// It holds three tables of ternary entries (value, care mask) with a data
// word per entry, searched first-match in entry order:
//   rule table  - 128-bit entries made of two 64-bit slots; a search takes
//                 two commands, OP_RM1 (first slot) then OP_RM2 (second);
//   SPORT range table and DPORT range table - 16-bit entries searched with
//                 the low 16 bits of the slot key by OP_KE_SP / OP_KE_DP.
// Results come out LAT cycles after the command edge, typed RES_RM (only
// after the second slot), RES_KE1 or RES_KE2; a miss returns hit = 0 and
// data = 0 (an all-zero range code).
//
// Tables are loaded through the prog_* port before traffic starts.
module tcam_model
  import dppc_pkg::*;
#(
  parameter int unsigned N_RULES = 64,
  parameter int unsigned N_RANGE = 16,
  parameter int unsigned LAT     = 2
) (
  input  logic             clk,
  input  tcam_cmd_t        cmd,
  output tcam_res_t        res,
  input  logic             prog_we,
  input  logic [1:0]       prog_sel,   // 0 rules, 1 SPORT ranges, 2 DPORT ranges
  input  int unsigned      prog_idx,
  input  logic [127:0]     prog_val,
  input  logic [127:0]     prog_msk,   // 1 = bit is compared
  input  logic [15:0]      prog_data,
  input  logic             prog_clear
);

  logic [127:0] r_val [N_RULES];
  logic [127:0] r_msk [N_RULES];
  logic [15:0]  r_dat [N_RULES];
  logic         r_vld [N_RULES];
  logic [15:0]  s_val [N_RANGE], s_msk [N_RANGE], s_dat [N_RANGE];
  logic         s_vld [N_RANGE];
  logic [15:0]  d_val [N_RANGE], d_msk [N_RANGE], d_dat [N_RANGE];
  logic         d_vld [N_RANGE];

  logic [63:0]  slot1;
  tcam_res_t    pipe [LAT];

  function automatic tcam_res_t search(tcam_cmd_t c, logic [63:0] s1);
    tcam_res_t r;
    logic [127:0] full;
    r = '{rtype: RES_NONE, hit: 1'b0, data: '0};
    if (!c.valid) return r;
    case (c.op)
      OP_RM2: begin
        r.rtype = RES_RM;
        full = {s1, c.key};
        for (int i = 0; i < int'(N_RULES); i++)
          if (r_vld[i] && (((full ^ r_val[i]) & r_msk[i]) == '0)) begin
            r.hit = 1'b1; r.data = r_dat[i]; break;
          end
      end
      OP_KE_SP: begin
        r.rtype = RES_KE1;
        for (int i = 0; i < int'(N_RANGE); i++)
          if (s_vld[i] && (((c.key[15:0] ^ s_val[i]) & s_msk[i]) == '0)) begin
            r.hit = 1'b1; r.data = s_dat[i]; break;
          end
      end
      OP_KE_DP: begin
        r.rtype = RES_KE2;
        for (int i = 0; i < int'(N_RANGE); i++)
          if (d_vld[i] && (((c.key[15:0] ^ d_val[i]) & d_msk[i]) == '0)) begin
            r.hit = 1'b1; r.data = d_dat[i]; break;
          end
      end
      default: ;
    endcase
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (cmd.valid && cmd.op == OP_RM1) slot1 <= cmd.key;
    pipe[0] <= search(cmd, slot1);
    for (int i = 1; i < int'(LAT); i++) pipe[i] <= pipe[i-1];
  end

  assign res = pipe[LAT-1];

  always_ff @(posedge clk) begin
    if (prog_clear) begin
      for (int i = 0; i < int'(N_RULES); i++) r_vld[i] <= 1'b0;
      for (int i = 0; i < int'(N_RANGE); i++) begin
        s_vld[i] <= 1'b0;
        d_vld[i] <= 1'b0;
      end
    end else if (prog_we) begin
      case (prog_sel)
        2'd0: begin
          r_val[prog_idx] <= prog_val; r_msk[prog_idx] <= prog_msk;
          r_dat[prog_idx] <= prog_data; r_vld[prog_idx] <= 1'b1;
        end
        2'd1: begin
          s_val[prog_idx] <= prog_val[15:0]; s_msk[prog_idx] <= prog_msk[15:0];
          s_dat[prog_idx] <= prog_data; s_vld[prog_idx] <= 1'b1;
        end
        default: begin
          d_val[prog_idx] <= prog_val[15:0]; d_msk[prog_idx] <= prog_msk[15:0];
          d_dat[prog_idx] <= prog_data; d_vld[prog_idx] <= 1'b1;
        end
      endcase
    end
  end

  initial begin
    for (int i = 0; i < int'(LAT); i++) pipe[i] = '{rtype: RES_NONE, hit: 1'b0, data: '0};
  end

endmodule
