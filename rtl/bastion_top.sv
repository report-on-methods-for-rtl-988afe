// bastion_top: top level that places the three designs of this repository
// side by side. They share only clock and reset.
//
//  1. Fault management subsystem (fmi_subsystem): an instrument manager that
//     retargets a four-FCX-SIB IJTAG network with three instrument registers
//     (bus-mapped command/data registers, high and low priority interrupts,
//     autonomous fault localization). Ports prefixed fm_.
//  2. Wrapped core test (core_wrapper + lbist): an IEEE 1500 style wrapper
//     with 645 input and 4,596 output cells around a core whose logic lies
//     outside this top (cw_core_in / cw_core_out). The wrapper is driven from
//     the cw_ ports, except while the logic BIST controller is busy: then the
//     BIST owns the wrapper in INTEST (its two PRPG bits feed the input and
//     output chains, its MISR compacts both chain outputs, the outputs toward
//     the system are held safe). Ports prefixed cw_ and bist_.
//     Next to it, one cell of each of the two other wrapper-cell styles
//     (dedicated with safe value, shared without) on their own ports (dwc_,
//     swc_), so that all three cell types compared in the document are present.
//  3. IJTAG network test: the four example networks (net_fig28a, net_fig26,
//     net_fig28b, net_fig30) with their TAP-side control ports (n28_, n26_,
//     n28b_, n30_) and one session tester that, when started, takes over
//     shift_en and tdi of the network chosen by st_net (0: net_fig28a,
//     1: net_fig26, 2: net_fig28b, 3: net_fig30) for one test phase.
//     Beside them the network with multiplexed branches
//     (net_fig34, ports n34_) used to compare access times of
//     configuration sequences, and the three-controller network (net_fig37,
//     ports n37_) whose configurations form a small state machine; neither is
//     connected to the session tester.
// All timing is that of the blocks; this module adds only multiplexers.
module bastion_top #(
  parameter int unsigned N_IN  = 645,
  parameter int unsigned N_OUT = 4596
) (
  input  logic             clk,
  input  logic             rst_n,
  // 1. fault management subsystem
  input  logic             fm_bus_we,
  input  logic             fm_bus_addr,
  input  logic [31:0]      fm_bus_wdata,
  output logic [31:0]      fm_bus_rdata,
  output logic             fm_irq_hi,
  output logic             fm_irq_lo,
  input  logic [2:0]       fm_inst_f,
  input  logic [2:0]       fm_inst_c,
  input  logic [31:0]      fm_inst_rd_1,
  input  logic [15:0]      fm_inst_rd_2,
  input  logic [31:0]      fm_inst_rd_3,
  output logic [31:0]      fm_inst_wr_1,
  output logic [15:0]      fm_inst_wr_2,
  output logic [31:0]      fm_inst_wr_3,
  output logic [3:0]       fm_sib_open,
  output logic [3:0]       fm_sib_mask,
  // 2. wrapped core and logic BIST
  input  logic             cw_test_en,
  input  logic             cw_extest_en,
  input  logic             cw_scan_en,
  input  logic             cw_safe_en,
  input  logic             cw_scan_in_i,
  output logic             cw_scan_out_i,
  input  logic             cw_scan_in_o,
  output logic             cw_scan_out_o,
  input  logic [N_IN-1:0]  cw_pi,
  output logic [N_IN-1:0]  cw_core_in,
  input  logic [N_OUT-1:0] cw_core_out,
  output logic [N_OUT-1:0] cw_po,
  input  logic             bist_start,
  input  logic [31:0]      bist_seed,
  input  logic [15:0]      bist_patterns,
  input  logic [15:0]      bist_shift_len,
  input  logic [31:0]      bist_golden,
  output logic             bist_busy,
  output logic             bist_done,
  output logic             bist_pass,
  output logic [31:0]      bist_signature,
  //    the two other wrapper cell styles
  input  logic             dwc_shift_en,
  input  logic             dwc_capture_en,
  input  logic             dwc_safe_ctrl,
  input  logic             dwc_safe_value,
  input  logic             dwc_cti,
  input  logic             dwc_cfi,
  output logic             dwc_cto,
  output logic             dwc_cfo,
  input  logic             swc_shift_en,
  input  logic             swc_capture_en,
  input  logic             swc_cti,
  input  logic             swc_cfi,
  output logic             swc_cto,
  output logic             swc_cfo,
  // 3. IJTAG network test: example network #1
  input  logic             n28_capture_en,
  input  logic             n28_shift_en,
  input  logic             n28_update_en,
  input  logic             n28_tdi,
  output logic             n28_tdo,
  output logic [2:0]       n28_i1_out,
  input  logic [3:0]       n28_i2_in,
  output logic [3:0]       n28_tdr2_upd,
  output logic [1:0]       n28_cfg,
  //    three-SIB / ScanMux network
  input  logic             n26_capture_en,
  input  logic             n26_shift_en,
  input  logic             n26_update_en,
  input  logic             n26_tdi,
  output logic             n26_tdo,
  input  logic [3:0]       n26_cap_1,
  input  logic [4:0]       n26_cap_2,
  input  logic [5:0]       n26_cap_3,
  input  logic [6:0]       n26_cap_4,
  input  logic [7:0]       n26_cap_5,
  output logic [3:0]       n26_upd_1,
  output logic [4:0]       n26_upd_2,
  output logic [5:0]       n26_upd_3,
  output logic [6:0]       n26_upd_4,
  output logic [7:0]       n26_upd_5,
  output logic [3:0]       n26_cfg,
  //    example network #2
  input  logic             n28b_capture_en,
  input  logic             n28b_shift_en,
  input  logic             n28b_update_en,
  input  logic             n28b_tdi,
  output logic             n28b_tdo,
  output logic [2:0]       n28b_i1_out,
  input  logic [3:0]       n28b_i2_in,
  input  logic [4:0]       n28b_i3_in,
  output logic [3:0]       n28b_tdr2_upd,
  output logic [4:0]       n28b_tdr3_upd,
  output logic [2:0]       n28b_cfg,
  //    example network #3 (ScanMux)
  input  logic             n30_capture_en,
  input  logic             n30_shift_en,
  input  logic             n30_update_en,
  input  logic             n30_tdi,
  output logic             n30_tdo,
  output logic [2:0]       n30_i1_out,
  input  logic [3:0]       n30_i2_in,
  output logic [3:0]       n30_tdr2_upd,
  output logic             n30_cfg,
  //    network with multiplexed branches
  input  logic             n34_capture_en,
  input  logic             n34_shift_en,
  input  logic             n34_update_en,
  input  logic             n34_tdi,
  output logic             n34_tdo,
  output logic [19:0]      n34_i4_upd,
  output logic [4:0]       n34_cfg,
  //    three-controller network
  input  logic             n37_capture_en,
  input  logic             n37_shift_en,
  input  logic             n37_update_en,
  input  logic             n37_tdi,
  output logic             n37_tdo,
  output logic [2:0]       n37_cfg,
  //    session tester
  input  logic             st_start,
  input  logic [1:0]       st_net,
  input  logic [15:0]      st_long_len,
  input  logic [15:0]      st_path_len,
  output logic             st_busy,
  output logic             st_done,
  output logic             st_pass,
  output logic [16:0]      st_cycles
);
  // ---------------------------------------------------------------- 1
  fmi_subsystem u_fm (
    .clk, .rst_n,
    .bus_we(fm_bus_we), .bus_addr(fm_bus_addr), .bus_wdata(fm_bus_wdata),
    .bus_rdata(fm_bus_rdata), .irq_hi(fm_irq_hi), .irq_lo(fm_irq_lo),
    .inst_f(fm_inst_f), .inst_c(fm_inst_c),
    .inst_rd_1(fm_inst_rd_1), .inst_rd_2(fm_inst_rd_2), .inst_rd_3(fm_inst_rd_3),
    .inst_wr_1(fm_inst_wr_1), .inst_wr_2(fm_inst_wr_2), .inst_wr_3(fm_inst_wr_3),
    .sib_open(fm_sib_open), .sib_mask(fm_sib_mask)
  );

  // ---------------------------------------------------------------- 2
  logic       b_scan_en;
  logic [1:0] b_si, b_so;
  logic       w_test_en, w_extest_en, w_scan_en, w_safe_en, w_si_i, w_si_o;

  lbist #(.CHAINS(2), .CNT_W(16)) u_bist (
    .clk, .rst_n, .start(bist_start), .seed(bist_seed), .n_patterns(bist_patterns),
    .shift_len(bist_shift_len), .golden(bist_golden), .busy(bist_busy),
    .done(bist_done), .pass(bist_pass), .signature(bist_signature),
    .scan_en(b_scan_en), .chain_si(b_si), .chain_so(b_so)
  );

  always_comb begin
    if (bist_busy) begin
      w_test_en   = 1'b1;
      w_extest_en = 1'b0;
      w_scan_en   = b_scan_en;
      w_safe_en   = 1'b1;
      w_si_i      = b_si[0];
      w_si_o      = b_si[1];
    end else begin
      w_test_en   = cw_test_en;
      w_extest_en = cw_extest_en;
      w_scan_en   = cw_scan_en;
      w_safe_en   = cw_safe_en;
      w_si_i      = cw_scan_in_i;
      w_si_o      = cw_scan_in_o;
    end
  end

  core_wrapper #(.N_IN(N_IN), .N_OUT(N_OUT)) u_wrap (
    .clk, .test_en(w_test_en), .extest_en(w_extest_en), .scan_en(w_scan_en),
    .safe_en(w_safe_en), .scan_in_i(w_si_i), .scan_out_i(cw_scan_out_i),
    .scan_in_o(w_si_o), .scan_out_o(cw_scan_out_o), .pi(cw_pi),
    .core_in(cw_core_in), .core_out(cw_core_out), .po(cw_po)
  );
  assign b_so = {cw_scan_out_o, cw_scan_out_i};

  dedicated_wrapper_cell u_dwc (
    .shift_clk(clk), .shift_en(dwc_shift_en), .capture_en(dwc_capture_en),
    .safe_ctrl(dwc_safe_ctrl), .safe_value(dwc_safe_value),
    .cti(dwc_cti), .cfi(dwc_cfi), .cto(dwc_cto), .cfo(dwc_cfo)
  );

  shared_wrapper_cell u_swc (
    .shift_clk(clk), .shift_en(swc_shift_en), .capture_en(swc_capture_en),
    .cti(swc_cti), .cfi(swc_cfi), .cto(swc_cto), .cfo(swc_cfo)
  );

  // ---------------------------------------------------------------- 3
  logic st_shift, st_tdi, st_tdo;
  logic [3:0] n_tdo, n_sh, n_di, n_sh_in, n_di_in;

  session_tester #(.LW(16)) u_st (
    .clk, .rst_n, .start(st_start), .long_len(st_long_len), .path_len(st_path_len),
    .shift_en(st_shift), .tdi(st_tdi), .tdo(st_tdo), .busy(st_busy),
    .done(st_done), .pass(st_pass), .cycles(st_cycles)
  );

  // the tester's network choice is held while it runs
  logic [1:0] st_net_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                    st_net_q <= 2'd0;
    else if (st_start && !st_busy) st_net_q <= st_net;

  assign n_sh_in = {n30_shift_en, n28b_shift_en, n26_shift_en, n28_shift_en};
  assign n_di_in = {n30_tdi, n28b_tdi, n26_tdi, n28_tdi};
  assign st_tdo  = n_tdo[st_net_q];
  always_comb begin
    n_sh = n_sh_in;
    n_di = n_di_in;
    if (st_busy) begin
      n_sh[st_net_q] = st_shift;
      n_di[st_net_q] = st_tdi;
    end
  end

  net_fig28a u_n28 (
    .clk, .rst_n, .capture_en(n28_capture_en), .shift_en(n_sh[0]),
    .update_en(n28_update_en), .tdi(n_di[0]), .tdo(n_tdo[0]),
    .i1_out(n28_i1_out), .i2_in(n28_i2_in), .tdr2_upd(n28_tdr2_upd), .cfg(n28_cfg)
  );
  assign n28_tdo = n_tdo[0];

  net_fig26 u_n26 (
    .clk, .rst_n, .capture_en(n26_capture_en), .shift_en(n_sh[1]),
    .update_en(n26_update_en), .tdi(n_di[1]), .tdo(n_tdo[1]),
    .tdr_cap_1(n26_cap_1), .tdr_cap_2(n26_cap_2), .tdr_cap_3(n26_cap_3),
    .tdr_cap_4(n26_cap_4), .tdr_cap_5(n26_cap_5),
    .tdr_upd_1(n26_upd_1), .tdr_upd_2(n26_upd_2), .tdr_upd_3(n26_upd_3),
    .tdr_upd_4(n26_upd_4), .tdr_upd_5(n26_upd_5), .cfg(n26_cfg)
  );
  assign n26_tdo = n_tdo[1];

  net_fig28b u_n28b (
    .clk, .rst_n, .capture_en(n28b_capture_en), .shift_en(n_sh[2]),
    .update_en(n28b_update_en), .tdi(n_di[2]), .tdo(n_tdo[2]),
    .i1_out(n28b_i1_out), .i2_in(n28b_i2_in), .i3_in(n28b_i3_in),
    .tdr2_upd(n28b_tdr2_upd), .tdr3_upd(n28b_tdr3_upd), .cfg(n28b_cfg)
  );
  assign n28b_tdo = n_tdo[2];

  net_fig30 u_n30 (
    .clk, .rst_n, .capture_en(n30_capture_en), .shift_en(n_sh[3]),
    .update_en(n30_update_en), .tdi(n_di[3]), .tdo(n_tdo[3]),
    .i1_out(n30_i1_out), .i2_in(n30_i2_in), .tdr2_upd(n30_tdr2_upd), .cfg(n30_cfg)
  );
  assign n30_tdo = n_tdo[3];

  net_fig34 u_n34 (
    .clk, .rst_n, .capture_en(n34_capture_en), .shift_en(n34_shift_en),
    .update_en(n34_update_en), .tdi(n34_tdi), .tdo(n34_tdo), .i4_upd(n34_i4_upd), .cfg(n34_cfg)
  );

  net_fig37 u_n37 (
    .clk, .rst_n, .capture_en(n37_capture_en), .shift_en(n37_shift_en),
    .update_en(n37_update_en), .tdi(n37_tdi), .tdo(n37_tdo), .cfg(n37_cfg)
  );
endmodule
