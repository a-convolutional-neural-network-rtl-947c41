// Convolution engine with PWM neurons and digital accumulation (top level).
//
// Computes one 2-D convolution of an N x N feature class with an M x M
// receptive field into NO x NO internal states (NO = N-M+1), with NO
// neurons of M synapses each working in parallel and the rest done by
// time-sharing:
//
//   image column x+c --N input DWCs--> pulses --> neuron k gets rows k..k+M-1
//   weight column c  --M weight DWCs--> M weight setting circuits --> V_W
//   neuron k --output pulse--> WDC k --> DAS k <--> state word x, lane k
//
// Each output column x takes 2M cycles: one per receptive-field column c
// and weight sign. In the positive cycle the weight DWCs send the positive
// weights (negative ones as zero) and DAS adds; in the negative cycle they
// send the magnitudes of the negative weights and DAS subtracts. A smaller
// receptive field is run by loading zero weights. States are signed
// DATA_W-bit numbers; result column x is read through res_addr/res_data
// (one clock latency) while busy is low; sat_seen tells that some state
// was clipped during the last convolution.
//
// Interface timing: img_col_addr changes at the start of each cycle; the
// pixels of that column must be on img_col by the start of the integration
// phase, PW+2 clocks later, and held until it starts. Weights are written
// one by one through wmem_* while idle. One convolution takes
// NO*M*2*(3*PW+6) clocks. The dataflow follows the document's block
// diagram; the interface, timing and number formats are this design's own.
module cnn_conv_top
  import cnn_pkg::*;
#(
  parameter int unsigned N      = CNN_N,
  parameter int unsigned M      = CNN_M,
  parameter int unsigned DATA_W = CNN_DATA_W,
  localparam int unsigned NO    = N - M + 1,
  localparam int unsigned PW    = 1 << DATA_W,
  localparam int unsigned XW    = $clog2(N),
  localparam int unsigned CW    = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned RW    = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     acc_init,
  output logic                     busy,
  output logic                     done,
  output logic                     sat_seen,   // a DAS result was clipped
  // input feature class, one column at a time
  output logic [XW-1:0]            img_col_addr,
  input  logic [DATA_W-1:0]        img_col [N],
  // weight loading
  input  logic                     wmem_we,
  input  logic [CW-1:0]            wmem_row,
  input  logic [CW-1:0]            wmem_col,
  input  logic signed [DATA_W-1:0] wmem_wdata,
  // results
  input  logic [RW-1:0]            res_addr,
  output logic signed [DATA_W-1:0] res_data [NO]
);
  localparam int unsigned CXW = $clog2(NO + M);
  localparam int unsigned SW  = NO * DATA_W;

  logic [CXW-1:0]         x, img_addr;
  logic [CW-1:0]          c;
  logic                   neg;
  logic                   wmem_rd, wdwc_start, wset_clear, wset_latch;
  logic                   idwc_start, nrn_clear, cmp_en, wdc_clear;
  logic [VF_W-1:0]        v_f;
  logic [DATA_W-1:0]      v_ref;
  logic                   mem_re, mem_we, das_sub, das_init;

  conv_ctrl #(.NO(NO), .M(M), .PW(PW)) u_ctrl (
    .clk, .rst_n, .start, .acc_init, .busy, .done, .phase(),
    .x, .c, .neg, .img_addr,
    .wmem_rd, .wdwc_start, .wset_clear, .wset_latch,
    .idwc_start, .nrn_clear, .v_f, .cmp_en, .v_ref, .wdc_clear,
    .mem_re, .mem_we, .das_sub, .das_init
  );

  assign img_col_addr = XW'(img_addr);

  // ---------------- weight path ----------------
  logic signed [DATA_W-1:0] wcol [M];
  logic [DATA_W-1:0]        wmag [M];
  logic [M-1:0]             wpwm;
  logic [DATA_W-1:0]        v_w  [M];

  weight_mem #(.M(M), .W(DATA_W)) u_wmem (
    .clk, .we(wmem_we && !busy), .wrow(wmem_row), .wcol(wmem_col), .wdata(wmem_wdata),
    .rd_en(wmem_rd), .rcol(c), .rdata(wcol)
  );

  for (genvar r = 0; r < M; r++) begin : g_wrow
    // magnitude of the weight if its sign matches the current cycle
    always_comb begin
      if (neg) wmag[r] = (wcol[r] < 0) ? DATA_W'(-wcol[r]) : '0;
      else     wmag[r] = (wcol[r] > 0) ? DATA_W'(wcol[r])  : '0;
    end
    dwc #(.W(DATA_W)) u_wdwc (
      .clk, .rst_n, .start(wdwc_start), .value(wmag[r]), .pwm(wpwm[r])
    );
    weight_set #(.W(DATA_W)) u_wset (
      .clk, .rst_n, .clear(wset_clear), .pwm(wpwm[r]), .latch(wset_latch), .v_w(v_w[r])
    );
  end

  // ---------------- input path ----------------
  logic [N-1:0] ipwm;
  for (genvar i = 0; i < N; i++) begin : g_in
    dwc #(.W(DATA_W)) u_idwc (
      .clk, .rst_n, .start(idwc_start), .value(img_col[i]), .pwm(ipwm[i])
    );
  end

  // ---------------- neurons, converters, adder-subtractors ----------------
  logic [SW-1:0] state_rd, state_wr;
  logic [NO-1:0] das_ovf;

  for (genvar k = 0; k < NO; k++) begin : g_nrn
    logic              p_o;
    logic [DATA_W-1:0] conv;

    pwm_neuron #(.M(M), .W(DATA_W), .VF_W(VF_W)) u_nrn (
      .clk, .rst_n, .clear(nrn_clear), .p_in(ipwm[k +: M]), .v_w(v_w),
      .v_f, .v_ref, .cmp_en, .p_out(p_o)
    );
    wdc #(.W(DATA_W)) u_wdc (
      .clk, .rst_n, .clear(wdc_clear), .pwm(p_o), .value(conv)
    );
    das #(.W(DATA_W)) u_das (
      .state_in(state_rd[k*DATA_W +: DATA_W]), .conv_in(conv),
      .sub(das_sub), .init(das_init),
      .state_out(state_wr[k*DATA_W +: DATA_W]), .ovf(das_ovf[k])
    );
    assign res_data[k] = state_rd[k*DATA_W +: DATA_W];
  end

  // sticky saturation flag of the current convolution
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 sat_seen <= 1'b0;
    else if (start && !busy)    sat_seen <= 1'b0;
    else if (mem_we && |das_ovf) sat_seen <= 1'b1;
  end

  // ---------------- internal state memory ----------------
  state_mem #(.DEPTH(NO), .WIDTH(SW)) u_smem (
    .clk,
    .re(mem_re || !busy), .raddr(busy ? RW'(x) : res_addr), .rdata(state_rd),
    .we(mem_we), .waddr(RW'(x)), .wdata(state_wr)
  );
endmodule
