// dfx_accel_top: dynamic fixed-point compute subsystem of a CNN coprocessor.
//
// The coprocessor's compute units work on 12-bit fixed-point data whose
// binary point moves from layer to layer. An input unit on the incoming AXI
// stream quantizes the data to the 12-bit working format and measures its
// range; output units truncate the wide accumulators back to 12 bits in the
// format that range calls for. To get more throughput from the DSP slices,
// the compute units run on their own, faster clock (clk_dsp, 1.5x to 3x the
// fabric clock clk_fab); small dual-clock FIFOs decouple them from the image
// cache, the kernel caches and the vector register file, which stay on the
// fabric clock.
//
// Organisation (main configuration): N_CU = 12 compute units of LANES = 16
// MACs (192 MACs), grouped in clusters of CU_PER_CLUSTER = 4 that share one
// image-cache read port, each unit having its own kernel-cache port.
//   fabric clock                      | DSP clock
//   img port (per cluster) -> FIFO  --+--> broadcast pixels -> 4 x vmac_cu
//   wgt port (per unit)    -> FIFO  --+--> weights ---------^       |
//   res port (per unit)    <- FIFO  <-+-- dfx_output_unit <---------+
//   s_axis -> dfx_input_unit -> m_axis, measured format --sync--> output units
// The caches, the register file, the DMA and the instruction pipeline belong
// to the host coprocessor and are outside this module: their sides appear as
// valid/ready ports.
//
// Cluster sequencing (this design's choice): a cluster consumes one beat when
// its image FIFO and all its weight FIFOs hold data. A beat flagged last
// closes a dot product; it is held back until no earlier result is still in
// the compute pipeline and every result FIFO of the cluster has room, so a
// result is never dropped. The measured output format crosses into the DSP
// domain through a two-flop synchronizer: it only changes between layers,
// while no results are being produced.
//
// Interface timing: every port is valid/ready; a transfer happens on a
// rising edge of the port's clock with both high. Images carry the last flag
// (img_last); weights, results and formats follow the source design's dataflow.
module dfx_accel_top
  import dfx_pkg::*;
#(
  parameter int unsigned N_CU           = 12,
  parameter int unsigned CU_PER_CLUSTER = 4,
  parameter int unsigned LANES          = 16,
  parameter int unsigned ACC_W          = 48,
  parameter int unsigned FIFO_AW        = 4,
  parameter int unsigned IN_LANES       = 4,
  parameter int unsigned IN_W           = 16,
  localparam int unsigned N_CL          = N_CU / CU_PER_CLUSTER
) (
  input  logic                    clk_fab,
  input  logic                    rst_fab_n,
  input  logic                    clk_dsp,
  input  logic                    rst_dsp_n,

  // Input unit: AXI stream from memory, quantized stream back to memory.
  input  logic [$clog2(IN_W)-1:0] cfg_in_frac,
  input  frac_t                   cfg_q_frac,
  input  logic                    s_axis_tvalid,
  output logic                    s_axis_tready,
  input  logic signed [IN_W-1:0]  s_axis_tdata [IN_LANES],
  input  logic                    s_axis_tlast,
  output logic                    m_axis_tvalid,
  input  logic                    m_axis_tready,
  output word_t                   m_axis_tdata [IN_LANES],
  output logic                    m_axis_tlast,
  output logic                    m_axis_tsat,
  output logic                    meas_valid,
  output frac_t                   meas_frac,
  output logic [IN_W-1:0]         meas_maxabs,

  // Fraction bits of the products (pixel + weight fraction bits), DSP domain,
  // static while a layer runs.
  input  logic [4:0]              cfg_prod_frac,

  // Image-cache read ports, one per cluster (fabric clock).
  input  logic                    img_valid [N_CL],
  output logic                    img_ready [N_CL],
  input  word_t                   img_data  [N_CL][LANES],
  input  logic                    img_last  [N_CL],

  // Kernel-cache read ports, one per compute unit (fabric clock).
  input  logic                    wgt_valid [N_CU],
  output logic                    wgt_ready [N_CU],
  input  word_t                   wgt_data  [N_CU][LANES],

  // Results toward the vector register file, one per compute unit.
  output logic                    res_valid [N_CU],
  input  logic                    res_ready [N_CU],
  output word_t                   res_data  [N_CU][LANES],
  output logic                    res_sat   [N_CU]
);

  localparam int unsigned IMG_DW = LANES * WORD_W + 1;  // pixels + last
  localparam int unsigned WGT_DW = LANES * WORD_W;
  localparam int unsigned RES_DW = LANES * WORD_W + 1;  // words + sat flag

  // ---------------------------------------------------------------- input unit
  dfx_input_unit #(.IN_LANES(IN_LANES), .IN_W(IN_W)) u_in (
    .clk(clk_fab), .rst_n(rst_fab_n),
    .cfg_in_frac(cfg_in_frac), .cfg_q_frac(cfg_q_frac),
    .s_tvalid(s_axis_tvalid), .s_tready(s_axis_tready),
    .s_tdata(s_axis_tdata), .s_tlast(s_axis_tlast),
    .m_tvalid(m_axis_tvalid), .m_tready(m_axis_tready),
    .m_tdata(m_axis_tdata), .m_tlast(m_axis_tlast), .m_tsat(m_axis_tsat),
    .meas_valid(meas_valid), .meas_frac(meas_frac), .meas_maxabs(meas_maxabs)
  );

  frac_t out_frac_dsp;
  fifo_ptr_sync #(.W(FRAC_W)) u_fmt_sync (
    .clk(clk_dsp), .rst_n(rst_dsp_n), .d_in(meas_frac), .q_out(out_frac_dsp)
  );

  // ------------------------------------------------------------ clusters
  for (genvar c = 0; c < N_CL; c++) begin : g_cl
    logic                 img_rv, img_rr, img_rlast;
    logic [IMG_DW-1:0]    img_wd, img_rd;
    word_t                pix [LANES];
    logic                 wgt_rv [CU_PER_CLUSTER];
    logic                 res_wr [CU_PER_CLUSTER];
    logic                 all_w, all_room, fire;
    logic [2:0]           pend_q;   // last beats still in the pipeline

    for (genvar l = 0; l < LANES; l++) begin : g_pk
      assign img_wd[l*WORD_W +: WORD_W] = img_data[c][l];
      assign pix[l] = word_t'(img_rd[l*WORD_W +: WORD_W]);
    end
    assign img_wd[IMG_DW-1] = img_last[c];
    assign img_rlast        = img_rd[IMG_DW-1];

    async_fifo #(.DW(IMG_DW), .AW(FIFO_AW)) u_img_fifo (
      .wclk(clk_fab), .wrst_n(rst_fab_n),
      .wr_valid(img_valid[c]), .wr_ready(img_ready[c]), .wr_data(img_wd),
      .rclk(clk_dsp), .rrst_n(rst_dsp_n),
      .rd_valid(img_rv), .rd_ready(img_rr), .rd_data(img_rd)
    );

    always_comb begin
      all_w    = 1'b1;
      all_room = 1'b1;
      for (int u = 0; u < CU_PER_CLUSTER; u++) begin
        all_w    = all_w & wgt_rv[u];
        all_room = all_room & res_wr[u];
      end
      fire = img_rv && all_w && (!img_rlast || (all_room && pend_q == '0));
    end
    assign img_rr = fire;

    always_ff @(posedge clk_dsp or negedge rst_dsp_n) begin
      if (!rst_dsp_n) pend_q <= '0;
      else            pend_q <= {pend_q[1:0], fire && img_rlast};
    end

    for (genvar u = 0; u < CU_PER_CLUSTER; u++) begin : g_cu
      localparam int unsigned K = c * CU_PER_CLUSTER + u;
      logic [WGT_DW-1:0]       wgt_rd;
      logic [RES_DW-1:0]       res_wd, res_rd;
      word_t                   wgt [LANES];
      word_t                   ou_data [LANES];
      logic signed [ACC_W-1:0] acc [LANES];
      logic                    acc_v, ou_v, ou_sat;

      async_fifo #(.DW(WGT_DW), .AW(FIFO_AW)) u_wgt_fifo (
        .wclk(clk_fab), .wrst_n(rst_fab_n),
        .wr_valid(wgt_valid[K]), .wr_ready(wgt_ready[K]), .wr_data(wgt_pack(wgt_data[K])),
        .rclk(clk_dsp), .rrst_n(rst_dsp_n),
        .rd_valid(wgt_rv[u]), .rd_ready(fire), .rd_data(wgt_rd)
      );

      for (genvar l = 0; l < LANES; l++) begin : g_w
        assign wgt[l] = word_t'(wgt_rd[l*WORD_W +: WORD_W]);
        assign res_wd[l*WORD_W +: WORD_W] = ou_data[l];
        assign res_data[K][l] = word_t'(res_rd[l*WORD_W +: WORD_W]);
      end
      assign res_wd[RES_DW-1] = ou_sat;
      assign res_sat[K]       = res_rd[RES_DW-1];

      vmac_cu #(.LANES(LANES), .ACC_W(ACC_W)) u_cu (
        .clk(clk_dsp), .rst_n(rst_dsp_n),
        .in_valid(fire), .in_last(img_rlast),
        .pix(pix), .wgt(wgt),
        .out_valid(acc_v), .acc_out(acc)
      );

      dfx_output_unit #(.LANES(LANES), .ACC_W(ACC_W)) u_out (
        .clk(clk_dsp), .rst_n(rst_dsp_n),
        .in_valid(acc_v), .acc_in(acc),
        .prod_frac(cfg_prod_frac), .out_frac(out_frac_dsp),
        .out_valid(ou_v), .out_data(ou_data), .sat_any(ou_sat)
      );

      async_fifo #(.DW(RES_DW), .AW(FIFO_AW)) u_res_fifo (
        .wclk(clk_dsp), .wrst_n(rst_dsp_n),
        .wr_valid(ou_v), .wr_ready(res_wr[u]), .wr_data(res_wd),
        .rclk(clk_fab), .rrst_n(rst_fab_n),
        .rd_valid(res_valid[K]), .rd_ready(res_ready[K]), .rd_data(res_rd)
      );

      // A result must always find room: the sequencing above guarantees it.
      a_no_drop: assert property (@(posedge clk_dsp) disable iff (!rst_dsp_n)
                                  ou_v |-> res_wr[u]);
    end
  end

  function automatic logic [WGT_DW-1:0] wgt_pack(input word_t w [LANES]);
    logic [WGT_DW-1:0] p;
    for (int l = 0; l < LANES; l++) p[l*WORD_W +: WORD_W] = w[l];
    return p;
  endfunction

endmodule
