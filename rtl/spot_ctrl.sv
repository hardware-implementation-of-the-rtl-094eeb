// spot_ctrl: one copy of the SPOT sequencer, built to be triplicated.
//
// Steps the chain through the processing of a couple of images:
//   IMG  - waiting for the clusters of an image (`cl_done`); after the first
//          image of a couple it waits for the second one, after the second
//          (or after a single image when `single` is high) it starts fusion;
//   FUSE - cluster fusion running, until `fus_done`;
//   ANTI - antitracking running, until `anti_done`;
//   GROW - cluster growth updating the database, until `grow_done`; then back
//          to IMG for the next couple.
// The copy computes its next state from `state_recv`, the majority of the
// three copies (see tmr_voter), not from its own register, so an upset copy
// is corrected on the next clock. `seu_flip` inverts bit 0 of the register,
// to emulate an upset when testing. The state is `{phase[1:0], img}`.
module spot_ctrl
  import spot_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] state_recv,
  input  logic       single,
  input  logic       cl_done,
  input  logic       fus_done,
  input  logic       anti_done,
  input  logic       grow_done,
  input  logic       seu_flip,
  output logic [2:0] state_out
);
  localparam logic [1:0] P_IMG = 2'd0, P_FUSE = 2'd1, P_ANTI = 2'd2, P_GROW = 2'd3;
  logic [1:0] ph, ph_n;
  logic       img, img_n;
  assign ph  = state_recv[2:1];
  assign img = state_recv[0];

  always_comb begin
    ph_n = ph; img_n = img;
    unique case (ph)
      P_IMG:  if (cl_done) begin
                if (single || img) begin ph_n = P_FUSE; img_n = 1'b0; end
                else img_n = 1'b1;
              end
      P_FUSE: if (fus_done)  ph_n = P_ANTI;
      P_ANTI: if (anti_done) ph_n = P_GROW;
      P_GROW: if (grow_done) ph_n = P_IMG;
      default: ph_n = P_IMG;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_out <= '0;
    else        state_out <= {ph_n, img_n ^ seu_flip};
  end
endmodule
