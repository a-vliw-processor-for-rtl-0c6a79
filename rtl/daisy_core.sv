// daisy_core: the 8-issue tree-VLIW execution core.
//
// Pipeline (three stages, one tree VLIW per cycle):
//   IF  the instruction line named by the previous VLIW's header is read
//       from the L1 instruction cache; it holds the four possible targets of
//       the VLIW now in EX. The branch units pick one of them in the same
//       cycle (multi-way branch every cycle, no branch penalty), and that
//       VLIW's header gives the next line address.
//   EX  register fetch (from the ALU's own register-file copy, through the
//       bypass network), execution in 8 ALUs, branch evaluation, data cache
//       access for up to 4 memory operations (odd slots).
//   WB  register and condition-register write-back; load shift and select;
//       stores retire from the data-cache write buffers.
// Only operations on the path the tree selects commit.
//
// Stalls and exceptions are recognised in the cycle after the one in which
// they occur, as described: a data-cache miss or an exception of the VLIW in
// EX in cycle n is seen in cycle n+1, when its (invalid) results sit in the
// EX/WB registers and the next VLIW is in EX. In that cycle the WB writes
// and the stores of VLIW n are suppressed, the EX work of n+1 is discarded,
// and the pipeline registers are rolled back to their last valid state (the
// copies kept from cycle n): for a data miss VLIW n is reloaded into EX and
// its instruction line is fetched again, then it re-executes once the data
// cache has its line. An instruction-cache miss on the fetch of cycle n
// makes the VLIW in EX in n+1 invalid; it is dropped and the fetch of cycle
// n is replayed (same line, same path choice) after the refill. Exceptions
// redirect fetch to EXC_LINE and record the VLIW address and the cause; an
// indirect branch (BRI) redirects fetch to a VLIW address from a register,
// which costs one bubble.
//
// Own choices: the register and condition-register forwarding, the replay
// mechanism details, reset and exception addresses, indirect branches,
// event counters (cnt_*) that count the pipeline events.
module daisy_core
  import daisy_pkg::*;
#(
  parameter logic [LADDR_W-1:0] RESET_LINE = 25'h100,   // byte 0x8000
  parameter logic [LADDR_W-1:0] EXC_LINE   = 25'h200    // byte 0x10000
) (
  input  logic                  clk,
  input  logic                  rst,
  // L1 instruction cache
  output logic                  ic_rd_en,
  output logic [LADDR_W-1:0]    ic_rd_line,
  input  iline_t                ic_line,
  input  logic                  ic_hit,
  input  logic                  ic_busy,
  // L1 data cache
  output memreq_t [NMEM-1:0]    dc_req,
  output logic                  dc_commit,
  input  logic [NMEM-1:0][31:0] dc_rdata,
  input  logic                  dc_miss,
  input  logic                  dc_busy,
  // exception state
  output logic [31:0]           epc,
  output exc_e                  cause,
  // event counters
  output logic [31:0]           cnt_cycles,
  output logic [31:0]           cnt_retired,
  output logic [31:0]           cnt_dstall,
  output logic [31:0]           cnt_istall,
  output logic [31:0]           cnt_exc,
  output logic [31:0]           cnt_bri,
  output logic [31:0]           cnt_bypass,
  output logic [31:0]           cnt_multiway
);
  typedef enum logic [1:0] {S_RUN, S_DWAIT, S_IWAIT} st_e;

  st_e                 st;
  // fetch state
  logic [LADDR_W-1:0]  fetch_line_q;
  logic                force_q;
  logic [1:0]          force_sub_q;
  // EX stage register
  logic                ex_valid_q;
  vliw_t               ex_q;
  logic [31:0]         ex_addr_q;
  // copies for rollback (state of the previous cycle)
  vliw_t               prev_ex_q;
  logic [31:0]         prev_ex_addr_q;
  logic [LADDR_W-1:0]  prev_fetch_q;
  logic [1:0]          prev_sel_q;
  // EX/WB registers
  logic                wb_valid_q;
  logic [NSLOT-1:0]    wb_en_q;
  logic [NSLOT-1:0][5:0] wb_rt_q;
  logic [NSLOT-1:0][REG_W-1:0] wb_rslt_q;
  ldinfo_t [NMEM-1:0]  wb_ld_q;
  logic [NMEM-1:0][31:0] wb_raw_q;
  logic [NSLOT-1:0]    wb_crwe_q;
  logic [NSLOT-1:0][3:0] wb_cridx_q, wb_crval_q;
  // flags for recognition in the next cycle
  logic                dmiss_q, exc_q, bri_q, imiss_q;
  exc_e                exc_cause_q;
  logic [31:0]         bri_tgt_q;

  // ---------------------------------------------------------------- control
  logic squash, kill_wb, exec, fetch;
  assign squash  = (st == S_RUN) && (dmiss_q || exc_q || bri_q || imiss_q);
  assign kill_wb = dmiss_q || exc_q;
  assign exec    = (st == S_RUN) && ex_valid_q && !squash;
  assign fetch   = (st == S_RUN) && !squash && (ex_valid_q || force_q);

  // ------------------------------------------------------------ write back
  logic [NSLOT-1:0]            rf_wen;
  logic [NSLOT-1:0][REG_W-1:0] rf_wdata;
  logic [NMEM-1:0][REG_W-1:0]  ld_rslt;
  logic [NSLOT-1:0]            byp_en;
  logic [NMEM-1:0]             byp_ld_en;
  logic [NMEM-1:0][5:0]        byp_ld_rt;
  logic [NSLOT-1:0]            cr_wen;

  for (genvar k = 0; k < NMEM; k++) begin : g_ld
    load_align u_la (.raw(wb_raw_q[k]), .info(wb_ld_q[k]), .result(ld_rslt[k]));
  end

  always_comb begin
    for (int s = 0; s < NSLOT; s++) begin
      automatic logic is_ld = (s % 2 == 1) && wb_ld_q[s/2].en;
      rf_wen[s]   = wb_valid_q && !kill_wb && wb_en_q[s];
      rf_wdata[s] = is_ld ? ld_rslt[s/2] : wb_rslt_q[s];
      byp_en[s]   = rf_wen[s] && !is_ld;
      cr_wen[s]   = wb_valid_q && !kill_wb && wb_crwe_q[s];
    end
    for (int k = 0; k < NMEM; k++) begin
      byp_ld_en[k] = rf_wen[2*k+1] && wb_ld_q[k].en;
      byp_ld_rt[k] = wb_rt_q[2*k+1];
    end
  end
  assign dc_commit = wb_valid_q && !kill_wb;

  // two shared write decoders, each serving four register-file copies
  logic [1:0][NGPR-1:0]             dec_we;
  logic [1:0][NGPR-1:0][2:0]        dec_port;
  for (genvar d = 0; d < 2; d++) begin : g_wdec
    write_dec u_wdec (.wen(rf_wen), .wsel(wb_rt_q), .reg_we(dec_we[d]),
                      .reg_port(dec_port[d]));
  end

  logic [NCR-1:0][3:0] cr_q, cr_fwd;
  cr_file u_cr (.clk, .rst, .wen(cr_wen), .widx(wb_cridx_q), .wval(wb_crval_q),
                .rd_q(cr_q), .rd_fwd(cr_fwd));

  // --------------------------------------------------------- branch units
  logic [NPATH-1:0][NPATH-1:0]  bu_taken;
  logic [NPATH-1:0][NPATH-1:0]  bu_selv;
  logic [NPATH-1:0][1:0]        bu_sub;
  logic [NPATH-1:0][LADDR_W-1:0] bu_next;
  logic [NPATH-1:0][LADDR_W-1:0] bank_next;
  logic                          redirect;
  logic [LADDR_W-1:0]            redirect_line;

  always_comb begin
    for (int b = 0; b < NPATH; b++) bank_next[b] = ic_line.hdr[b].next_line;
    redirect      = squash && !dmiss_q && (exc_q || bri_q);
    redirect_line = exc_q ? EXC_LINE : bri_tgt_q[31:7];
  end

  for (genvar p = 0; p < NPATH; p++) begin : g_bu
    branch_unit u_bu (
      .hdr(ex_q.hdr), .ex_valid(exec), .cr(cr_fwd), .bank_next(bank_next),
      .force_sel(force_q), .force_sub(force_sub_q),
      .redirect(redirect), .redirect_line(redirect_line),
      .path_taken(bu_taken[p]), .subline_sel(bu_selv[p]), .subline(bu_sub[p]),
      .next_line(bu_next[p]));
  end

  assign ic_rd_en   = fetch;
  assign ic_rd_line = fetch_line_q;

  // ------------------------------------------------------------ execution
  logic [NSLOT-1:0]            s_active, s_wen, s_crwe, s_verify, s_bri;
  logic [NSLOT-1:0][REG_W-1:0] s_rslt, s_opa, s_opb, g_a, g_b;
  logic [NSLOT-1:0][3:0]       s_cridx, s_crval;
  memreq_t [NSLOT-1:0]         s_mem;
  ldinfo_t [NSLOT-1:0]         s_ld;
  exc_e [NSLOT-1:0]            s_exc;
  logic [NSLOT-1:0][31:0]      s_britgt;
  logic [NSLOT-1:0][5:0]       s_rb;
  logic [NSLOT-1:0][1:0]       s_sela, s_selb;

  for (genvar s = 0; s < NSLOT; s++) begin : g_slot
    op_t op;
    assign op          = ex_q.ops[s];
    assign s_active[s] = exec && |(op.path & bu_taken[s/2]);
    assign s_rb[s]     = srcb_is_rt(op.opc) ? op.rt : op.imm[9:4];

    gpr_copy u_rf (
      .clk, .rst, .reg_we(dec_we[(s/2) % 2]), .reg_port(dec_port[(s/2) % 2]),
      .wdata(rf_wdata), .ra_a(op.ra), .ra_b(s_rb[s]), .rd_a(g_a[s]), .rd_b(g_b[s]));

    reg_bypass u_bya (
      .src(op.ra), .use_imm(1'b0), .imm('0), .gpr_data(g_a[s]),
      .en(byp_en), .rt(wb_rt_q), .rslt(wb_rslt_q),
      .ld_en(byp_ld_en), .ld_rt(byp_ld_rt), .ld_rslt(ld_rslt),
      .select_bypass(s_sela[s]), .operand(s_opa[s]));
    reg_bypass u_byb (
      .src(s_rb[s]), .use_imm(uses_imm(op.opc)), .imm(imm_value(op)),
      .gpr_data(g_b[s]),
      .en(byp_en), .rt(wb_rt_q), .rslt(wb_rslt_q),
      .ld_en(byp_ld_en), .ld_rt(byp_ld_rt), .ld_rslt(ld_rslt),
      .select_bypass(s_selb[s]), .operand(s_opb[s]));

    alu_slot #(.SLOT(s)) u_alu (
      .op(op), .active(s_active[s]), .opa(s_opa[s]), .opb(s_opb[s]),
      .cr(cr_fwd), .vliw_addr(ex_addr_q),
      .wen(s_wen[s]), .result(s_rslt[s]), .cr_we(s_crwe[s]),
      .cr_idx(s_cridx[s]), .cr_val(s_crval[s]), .mem(s_mem[s]), .ld(s_ld[s]),
      .verify(s_verify[s]), .exc(s_exc[s]), .bri(s_bri[s]),
      .bri_tgt(s_britgt[s]));
  end

  logic        any_exc, any_bri, any_byp;
  exc_e        first_exc;
  logic [31:0] first_bri;
  always_comb begin
    for (int k = 0; k < NMEM; k++) dc_req[k] = s_mem[2*k+1];
    any_exc = 1'b0; first_exc = EXC_NONE;
    any_bri = 1'b0; first_bri = '0;
    any_byp = 1'b0;
    for (int s = NSLOT - 1; s >= 0; s--) begin
      if (s_exc[s] != EXC_NONE) begin any_exc = 1'b1; first_exc = s_exc[s]; end
      if (s % 2 == 1 && s_verify[s] && dc_rdata[s/2] != s_opb[s][31:0]) begin
        any_exc = 1'b1; first_exc = EXC_VERIFY;
      end
      if (s_bri[s]) begin any_bri = 1'b1; first_bri = s_britgt[s]; end
      if (s_active[s] && (s_sela[s] inside {2'd1, 2'd2} ||
                          s_selb[s] inside {2'd1, 2'd2})) any_byp = 1'b1;
    end
  end

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_RUN;
      fetch_line_q <= RESET_LINE; force_q <= 1'b1; force_sub_q <= '0;
      ex_valid_q <= 1'b0; ex_q <= '0; ex_addr_q <= '0;
      prev_ex_q <= '0; prev_ex_addr_q <= '0; prev_fetch_q <= '0; prev_sel_q <= '0;
      wb_valid_q <= 1'b0; wb_en_q <= '0; wb_rt_q <= '0; wb_rslt_q <= '0;
      wb_ld_q <= '0; wb_raw_q <= '0; wb_crwe_q <= '0; wb_cridx_q <= '0;
      wb_crval_q <= '0;
      dmiss_q <= 1'b0; exc_q <= 1'b0; bri_q <= 1'b0; imiss_q <= 1'b0;
      exc_cause_q <= EXC_NONE; bri_tgt_q <= '0;
      epc <= '0; cause <= EXC_NONE;
      cnt_cycles <= '0; cnt_retired <= '0; cnt_dstall <= '0; cnt_istall <= '0;
      cnt_exc <= '0; cnt_bri <= '0; cnt_bypass <= '0; cnt_multiway <= '0;
    end else begin
      cnt_cycles <= cnt_cycles + 1;
      if (wb_valid_q && !kill_wb) cnt_retired <= cnt_retired + 1;
      if (exec && any_byp) cnt_bypass <= cnt_bypass + 1;
      if (exec && ex_q.hdr.tree_id != 4'd0 && bu_sub[0] != 2'd0) cnt_multiway <= cnt_multiway + 1;

      // EX/WB registers (results of this cycle's EX)
      wb_valid_q <= exec;
      wb_en_q    <= s_wen;
      for (int s = 0; s < NSLOT; s++) wb_rt_q[s] <= ex_q.ops[s].rt;
      wb_rslt_q  <= s_rslt;
      for (int k = 0; k < NMEM; k++) begin
        wb_ld_q[k]  <= s_ld[2*k+1];
        wb_raw_q[k] <= dc_rdata[k];
      end
      wb_crwe_q  <= s_crwe;
      wb_cridx_q <= s_cridx;
      wb_crval_q <= s_crval;
      dmiss_q     <= exec && dc_miss;
      exc_q       <= exec && any_exc;
      exc_cause_q <= first_exc;
      bri_q       <= exec && any_bri;
      bri_tgt_q   <= first_bri;
      imiss_q     <= fetch && !ic_hit;

      unique case (st)
        S_RUN: begin
          if (squash) begin
            ex_valid_q <= 1'b0;
            if (dmiss_q) begin
              // roll back to the VLIW that missed and its fetch
              cnt_dstall   <= cnt_dstall + 1;
              ex_q         <= prev_ex_q;
              ex_addr_q    <= prev_ex_addr_q;
              ex_valid_q   <= 1'b1;
              fetch_line_q <= prev_fetch_q;
              force_q      <= 1'b0;
              st           <= S_DWAIT;
            end else if (exc_q || bri_q) begin
              if (exc_q) begin
                cnt_exc <= cnt_exc + 1;
                epc     <= prev_ex_addr_q;
                cause   <= exc_cause_q;
              end else cnt_bri <= cnt_bri + 1;
              fetch_line_q <= bu_next[0];          // redirect line
              force_q      <= 1'b1;
              force_sub_q  <= exc_q ? 2'd0 : bri_tgt_q[6:5];
            end else begin
              // instruction miss: replay the fetch of the previous cycle
              cnt_istall   <= cnt_istall + 1;
              fetch_line_q <= prev_fetch_q;
              force_q      <= 1'b1;
              force_sub_q  <= prev_sel_q;
              st           <= S_IWAIT;
            end
          end else if (fetch) begin
            prev_ex_q      <= ex_q;
            prev_ex_addr_q <= ex_addr_q;
            prev_fetch_q   <= fetch_line_q;
            prev_sel_q     <= bu_sub[0];
            ex_q           <= {ic_line.hdr[bu_sub[0]], ic_line.ops[bu_sub[0]]};
            ex_addr_q      <= {fetch_line_q, bu_sub[0], 5'b00000};
            ex_valid_q     <= 1'b1;
            fetch_line_q   <= bu_next[0];
            force_q        <= 1'b0;
          end
        end
        S_DWAIT: if (!dc_busy) st <= S_RUN;
        S_IWAIT: if (!ic_busy) st <= S_RUN;
        default: st <= S_RUN;
      endcase
    end
  end
endmodule
