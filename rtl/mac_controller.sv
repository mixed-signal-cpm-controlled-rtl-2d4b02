// mac_controller: drives the two MAC test-load chips and decides whether they
// run correctly at the target clock (Pass for the main chip, Pass_aux for the
// auxiliary chip whose supply is slightly lower).
//
// Following the paper: it generates clk_MAC, creates the input vectors
// X_in/Y_in with pseudo-random bit sequence generators and sends them
// continuously, compares P_MAC and P_MAC_AUX with an ideal MAC, and only
// declares a pass after a sufficiently large set of vectors.
// This design's choices:
//   - clk_mac is the system clock divided by 2*MAC_HALF. Vectors change and
//     outputs are sampled on the system-clock edge where clk_mac falls, half
//     a clk_mac period away from the edge where the load captures them.
//   - X_in comes from a PRBS-15 (x^15+x^14+1) and Y_in from a PRBS-17
//     (x^17+x^14+1) generator, each advanced 8 steps per vector.
//   - The ideal MAC predicts each new output from the previously observed
//     one: P_new = P_old + N_MAC*X*Y (mod 2**16), N_MAC units per chip. An
//     error is therefore counted only in the vector where it happens.
//   - A window is N_VEC vectors. At its end `verdict` pulses for one clock
//     and pass/pass_aux are updated: 1 if no vector of the window failed.
//     Both are 0 after reset until the first window ends.
module mac_controller
  import mippt_pkg::XY_W, mippt_pkg::P_W;
#(
  parameter int unsigned N_VEC    = 1024,
  parameter int unsigned MAC_HALF = 1,
  parameter int unsigned N_MAC    = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            clk_mac,
  output logic [XY_W-1:0] x_in,
  output logic [XY_W-1:0] y_in,
  input  logic [P_W-1:0]  p_mac,
  input  logic [P_W-1:0]  p_mac_aux,
  output logic            pass,
  output logic            pass_aux,
  output logic            verdict
);

  localparam int unsigned HC_W = (MAC_HALF > 1) ? $clog2(MAC_HALF) : 1;
  localparam int unsigned VC_W = (N_VEC > 1) ? $clog2(N_VEC) : 1;

  logic [HC_W-1:0] half_cnt;
  logic [VC_W-1:0] vec_cnt;
  logic [14:0]     prbs_x;
  logic [16:0]     prbs_y;
  logic [P_W-1:0]  prev_main, prev_aux;
  logic            prev_valid;
  logic            err_main, err_aux;

  logic           fall_tick;
  logic [P_W-1:0] exp_main, exp_aux;
  logic           bad_main, bad_aux;
  logic [14:0]    nx_x;
  logic [16:0]    nx_y;

  assign fall_tick = clk_mac && (half_cnt == HC_W'(MAC_HALF-1));

  always_comb begin
    exp_main = prev_main + P_W'(N_MAC) * P_W'(x_in) * P_W'(y_in);
    exp_aux  = prev_aux  + P_W'(N_MAC) * P_W'(x_in) * P_W'(y_in);
    bad_main = prev_valid && (p_mac     != exp_main);
    bad_aux  = prev_valid && (p_mac_aux != exp_aux);
    nx_x = prbs_x;
    nx_y = prbs_y;
    for (int s = 0; s < XY_W; s++) begin
      nx_x = {nx_x[13:0], nx_x[14] ^ nx_x[13]};
      nx_y = {nx_y[15:0], nx_y[16] ^ nx_y[13]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_cnt   <= '0;
      clk_mac    <= 1'b0;
      prbs_x     <= 15'h0001;
      prbs_y     <= 17'h1ACE5;
      x_in       <= '0;
      y_in       <= '0;
      prev_main  <= '0;
      prev_aux   <= '0;
      prev_valid <= 1'b0;
      err_main   <= 1'b0;
      err_aux    <= 1'b0;
      vec_cnt    <= '0;
      pass       <= 1'b0;
      pass_aux   <= 1'b0;
      verdict    <= 1'b0;
    end else begin
      verdict <= 1'b0;
      if (half_cnt == HC_W'(MAC_HALF-1)) begin
        half_cnt <= '0;
        clk_mac  <= ~clk_mac;
      end else begin
        half_cnt <= half_cnt + 1'b1;
      end
      if (fall_tick) begin
        // check the vector captured at the last rising edge, launch the next
        prev_main  <= p_mac;
        prev_aux   <= p_mac_aux;
        prev_valid <= 1'b1;
        prbs_x     <= nx_x;
        prbs_y     <= nx_y;
        x_in       <= nx_x[XY_W-1:0];
        y_in       <= nx_y[XY_W-1:0];
        if (prev_valid) begin
          if (vec_cnt == VC_W'(N_VEC-1)) begin
            vec_cnt  <= '0;
            pass     <= !(err_main || bad_main);
            pass_aux <= !(err_aux  || bad_aux);
            verdict  <= 1'b1;
            err_main <= 1'b0;
            err_aux  <= 1'b0;
          end else begin
            vec_cnt  <= vec_cnt + 1'b1;
            err_main <= err_main || bad_main;
            err_aux  <= err_aux  || bad_aux;
          end
        end
      end
    end
  end

endmodule
