// sync_fifo: single-clock first-in first-out buffer.
//
// Write when `wr_en` and not `full`; read (pop) when `rd_en` and not `empty`;
// `rd_data` always shows the oldest entry (first-word fall-through). A write
// into a full FIFO is dropped and raises the sticky `overflow` flag.
// DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         overflow
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;

  assign empty   = (wp == rp);
  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else if (clr) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (wr_en && full)  overflow <= 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
