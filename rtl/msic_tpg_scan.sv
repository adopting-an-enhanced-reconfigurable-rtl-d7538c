// msic_tpg_scan: multiple-single-input-change (MSIC) test pattern generator
// for a test-per-scan full-scan circuit with M scan chains of at most L cells
// and SEED_W primary inputs.
//
// A seed LFSR (SEED_W >= M stages, stepped once per seed) and an SIC
// generator feed an XOR network: scan chain i receives SIC output i XOR seed
// bit i, and the seed itself drives the primary inputs. While se is high
// each chain takes one bit per cycle, so after L cycles every chain holds a
// different low-transition codeword (a Johnson codeword offset by the seed
// bit); capture then pulses for one cycle. The control block runs 2L such
// loads per seed and num_seeds seeds (see msic_ctrl for the cycle counts).
//
// USE_SCALABLE selects the SIC generator: 0 the L-stage reconfigurable
// Johnson counter (chain i takes stage J_i), 1 the scalable SIC counter
// (chain i takes shift-register stage i, K = log2 L). Both are part of the
// scheme; which one is default is this design's choice. Defaults are the
// s13207 example of the MSIC scheme: 10 chains, 64 cells; the seed width 20
// is the smallest seed count the scheme's results mention.
module msic_tpg_scan #(
  parameter int unsigned M            = 10,
  parameter int unsigned L            = 64,
  parameter int unsigned SEED_W       = 20,
  parameter bit          USE_SCALABLE = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       num_seeds,
  output logic [M-1:0]      scan_in,
  output logic [SEED_W-1:0] pi,
  output logic              se,
  output logic              capture,
  output logic              busy,
  output logic              done
);
  localparam int unsigned K = $clog2(L);

  initial assert (SEED_W >= M && L >= M) else $fatal(1, "msic_tpg_scan: need SEED_W >= M and L >= M");

  logic seed_step, jc_step, rj_mode, init;
  logic [SEED_W-1:0] seed;
  logic [M-1:0]      sic;

  msic_ctrl #(.L(L)) u_ctrl (
    .clk, .rst_n, .start, .num_seeds, .seed_step, .jc_step, .rj_mode, .init,
    .se, .capture, .busy, .done
  );

  seed_lfsr #(.W(SEED_W)) u_seed (.clk, .rst_n, .step(seed_step), .seed);

  if (USE_SCALABLE) begin : g_scalable
    scalable_sic #(.M(M), .K(K)) u_sic (.clk, .rst_n, .step(jc_step), .se, .q(sic));
    logic unused_mode;
    assign unused_mode = rj_mode ^ init;
  end else begin : g_johnson
    logic [L-1:0] jq;
    reconfig_johnson #(.L(L)) u_jc (.clk, .rst_n, .step(jc_step), .rj_mode, .init, .q(jq));
    assign sic = jq[M-1:0];
  end

  msic_xor_net #(.N(M)) u_xor (.a(sic), .b(seed[M-1:0]), .y(scan_in));

  assign pi = seed;
endmodule
