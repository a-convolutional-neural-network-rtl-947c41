// Time-sharing controller of the convolution engine.
//
// One convolution of an N x N feature class with an M x M receptive field
// is run as NO x M x 2 neuron-operation cycles (NO = N-M+1): for each output
// column x, for each receptive-field column c, one cycle with the positive
// weights and one with the negative weights. In each cycle all NO neurons
// work in parallel on image column x+c. This loop order and cycle count
// follow the document; the phases inside one cycle are this design's:
//
//   WLOAD  1 clock     read weight column c, put x+c on the image address
//   WSET   PW+1 clocks weight DWCs pulse, weight setting circuits measure,
//                      latch at the last clock
//   INTEG  PW+1 clocks input DWCs pulse, neuron capacitors charge; v_f
//                      follows the V_F waveform (cnn_pkg::vf_profile)
//   CONV   PW+1 clocks comparator vs. ramp v_ref = t-1, WDCs count
//   RD     1 clock     read state word x
//   WR     1 clock     write back adder-subtractor result
//
// i.e. 3*PW+6 clocks per cycle (198 with PW = 64). start is taken in idle;
// busy is high from the first WLOAD to the last WR; done pulses for one
// clock after the last WR. acc_init (sampled at start) makes the first
// cycle of every output column overwrite instead of accumulate.
module conv_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned NO  = 81,
  parameter int unsigned M   = 20,
  parameter int unsigned PW  = 64,
  localparam int unsigned XW = (NO + M > 2) ? $clog2(NO + M) : 1,
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned TW = $clog2(PW + 1),
  localparam int unsigned RW = (PW > 2) ? $clog2(PW) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          acc_init,
  output logic          busy,
  output logic          done,
  output phase_e        phase,
  output logic [XW-1:0] x,          // output column
  output logic [CW-1:0] c,          // receptive-field column
  output logic          neg,        // negative-weight cycle
  output logic [XW-1:0] img_addr,   // x + c
  // weight path
  output logic          wmem_rd,
  output logic          wdwc_start,
  output logic          wset_clear,
  output logic          wset_latch,
  // neuron path
  output logic          idwc_start,
  output logic          nrn_clear,
  output logic [VF_W-1:0] v_f,
  output logic          cmp_en,
  output logic [RW-1:0] v_ref,
  output logic          wdc_clear,
  // state memory / DAS
  output logic          mem_re,
  output logic          mem_we,
  output logic          das_sub,
  output logic          das_init
);
  logic [TW-1:0] t;
  logic          init_l;

  wire last_tick = (t == TW'(PW));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      t      <= '0;
      x      <= '0;
      c      <= '0;
      neg    <= 1'b0;
      init_l <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase  <= PH_WLOAD;
          x      <= '0;
          c      <= '0;
          neg    <= 1'b0;
          init_l <= acc_init;
        end
        PH_WLOAD: begin
          phase <= PH_WSET;
          t     <= '0;
        end
        PH_WSET, PH_INTEG, PH_CONV: begin
          if (last_tick) begin
            t     <= '0;
            phase <= (phase == PH_WSET) ? PH_INTEG :
                     (phase == PH_INTEG) ? PH_CONV : PH_RD;
          end else begin
            t <= t + 1'b1;
          end
        end
        PH_RD: phase <= PH_WR;
        PH_WR: begin
          neg <= ~neg;
          if (neg) begin
            if (c == CW'(M - 1)) begin
              c <= '0;
              if (x == XW'(NO - 1)) begin
                x     <= '0;
                phase <= PH_IDLE;
                done  <= 1'b1;
              end else begin
                x     <= x + 1'b1;
                phase <= PH_WLOAD;
              end
            end else begin
              c     <= c + 1'b1;
              phase <= PH_WLOAD;
            end
          end else begin
            phase <= PH_WLOAD;
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    busy       = (phase != PH_IDLE);
    img_addr   = x + XW'(c);
    wmem_rd    = (phase == PH_WLOAD);
    wdwc_start = (phase == PH_WSET) && (t == '0);
    wset_clear = wdwc_start;
    wset_latch = (phase == PH_WSET) && last_tick;
    idwc_start = (phase == PH_INTEG) && (t == '0);
    nrn_clear  = idwc_start;
    v_f        = ((phase == PH_INTEG) && (t != '0)) ? vf_profile((CNN_DATA_W+1)'(t - 1'b1)) : '0;
    wdc_clear  = (phase == PH_CONV) && (t == '0);
    cmp_en     = (phase == PH_CONV) && (t != '0);
    v_ref      = (t != '0) ? RW'(t - 1'b1) : '0;
    mem_re     = (phase == PH_RD);
    mem_we     = (phase == PH_WR);
    das_sub    = neg;
    das_init   = init_l && (c == '0) && !neg;
  end

  // a new cycle never starts while one is running
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_WR) |=> (phase == PH_WLOAD || phase == PH_IDLE));
endmodule
