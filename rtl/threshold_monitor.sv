// threshold_monitor: faulty-packet counter that switches the network to
// protected mode.
//
// Every cycle it adds the number of packets delivered by all network
// interfaces (rx_valid_i) and the number of those that arrived faulty
// (rx_faulty_i) to two counters. When at least THRESHOLD_PCT percent of the
// delivered packets were faulty (20 % in the method), jtec_en_o goes high
// and stays high until reset; it enables the JTEC decoders and encoders of
// all junction routers. MIN_PACKETS keeps a handful of early packets from
// deciding alone; that guard, its value and the single network-wide counter
// are this design's choices.
//
// Timing: the comparison uses the counters including the current cycle's
// packets, and jtec_en_o rises at the next clock edge. Counters saturate.
// Synchronous active-low reset.
module threshold_monitor #(
  parameter int unsigned N_NODES       = 36,
  parameter int unsigned THRESHOLD_PCT = 20,
  parameter int unsigned MIN_PACKETS   = 64,
  parameter int unsigned CNT_W         = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_NODES-1:0] rx_valid_i,
  input  logic [N_NODES-1:0] rx_faulty_i,
  output logic               jtec_en_o,
  output logic [CNT_W-1:0]   total_o,
  output logic [CNT_W-1:0]   faulty_o
);

  localparam int unsigned NW = $clog2(N_NODES + 1);

  logic [NW-1:0]    n_valid, n_faulty;
  logic [CNT_W:0]   total_nx, faulty_nx;
  logic [CNT_W+7:0] lhs, rhs;
  logic             hit;

  always_comb begin
    n_valid  = NW'($countones(rx_valid_i));
    n_faulty = NW'($countones(rx_valid_i & rx_faulty_i));
    total_nx  = {1'b0, total_o}  + (CNT_W+1)'(n_valid);
    faulty_nx = {1'b0, faulty_o} + (CNT_W+1)'(n_faulty);
    if (total_nx[CNT_W])  total_nx  = {1'b0, {CNT_W{1'b1}}};
    if (faulty_nx[CNT_W]) faulty_nx = {1'b0, {CNT_W{1'b1}}};
    lhs = (CNT_W+8)'(faulty_nx) * (CNT_W+8)'(100);
    rhs = (CNT_W+8)'(total_nx)  * (CNT_W+8)'(THRESHOLD_PCT);
    hit = (total_nx >= (CNT_W+1)'(MIN_PACKETS)) && (lhs >= rhs);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      total_o   <= '0;
      faulty_o  <= '0;
      jtec_en_o <= 1'b0;
    end else begin
      total_o  <= total_nx[CNT_W-1:0];
      faulty_o <= faulty_nx[CNT_W-1:0];
      if (hit) jtec_en_o <= 1'b1;
    end
  end

endmodule
