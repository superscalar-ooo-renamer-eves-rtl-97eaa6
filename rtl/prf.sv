// prf: physical register file with a separate ready-bit array.
//
// Values and ready bits live in two arrays, as the ready bits change far more
// often (every producer and consumer touches them) than the values. Reads are
// combinational from the stored state (NRD ports, value and ready bit each).
// On the rising edge: a write port stores a value and sets its ready bit; a
// clear port drops a ready bit (a newly renamed destination); all_ready sets
// every ready bit (full squash). Priority on the same register in one cycle:
// all_ready, then write, then clear. Among write ports, the higher-numbered
// port wins. There is no write-to-read bypass: a write is seen the next cycle.
// The port counts and the combined write+ready port are this design's choice.
module prf #(
  parameter int unsigned N_PHYS = vp_pkg::N_PHYS,
  parameter int unsigned XLEN   = vp_pkg::XLEN,
  parameter int unsigned NRD    = 3 * vp_pkg::WIDTH,
  parameter int unsigned NWR    = 2 * vp_pkg::WIDTH,
  parameter int unsigned NCLR   = vp_pkg::WIDTH,
  localparam int unsigned PW = $clog2(N_PHYS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NRD-1:0][PW-1:0]    rd_addr,
  output logic [NRD-1:0][XLEN-1:0]  rd_data,
  output logic [NRD-1:0]            rd_ready,
  input  logic [NWR-1:0]            wr_en,
  input  logic [NWR-1:0][PW-1:0]    wr_addr,
  input  logic [NWR-1:0][XLEN-1:0]  wr_data,
  input  logic [NCLR-1:0]           clr_en,
  input  logic [NCLR-1:0][PW-1:0]   clr_addr,
  input  logic                      all_ready
);

  logic [XLEN-1:0]   value [N_PHYS];
  logic [N_PHYS-1:0] ready;

  always_comb
    for (int r = 0; r < NRD; r++) begin
      rd_data[r]  = value[rd_addr[r]];
      rd_ready[r] = ready[rd_addr[r]];
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PHYS; p++) value[p] <= '0;
      ready <= '1;
    end else begin
      for (int c = 0; c < NCLR; c++)
        if (clr_en[c]) ready[clr_addr[c]] <= 1'b0;
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) begin
          value[wr_addr[w]] <= wr_data[w];
          ready[wr_addr[w]] <= 1'b1;
        end
      if (all_ready) ready <= '1;
    end
  end

endmodule
