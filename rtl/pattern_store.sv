// Pattern store: keeps the patterns whose transition density is adequate.
// A measured pattern presented with valid is written to the next free word
// when td <= td_limit (a lower TD means fewer transitions while testing);
// otherwise it is passed over and the flow goes on to the next pattern.
// count says how many words are held; once DEPTH words are held (full)
// further patterns are dropped. rd_data is an asynchronous read of word
// rd_addr. The comparison direction follows the design description; the
// limit as an input, the depth and the drop-when-full rule are this design's
// choices. Timing: saved and the write happen on the clock after valid.
module pattern_store
  import tpg_pkg::*;
#(
  parameter int unsigned N     = 5,
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       valid,
  input  logic [N-1:0]               pat,
  input  logic [TD_W-1:0]            td,
  input  logic [TD_W-1:0]            td_limit,
  output logic                       saved,
  output logic [$clog2(DEPTH):0]     count,
  output logic                       full,
  input  logic [$clog2(DEPTH)-1:0]   rd_addr,
  output logic [N-1:0]               rd_data
);

  logic [N-1:0] mem [DEPTH];
  logic         wr;

  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign wr      = valid && !full && (td <= td_limit);
  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr) mem[count[$clog2(DEPTH)-1:0]] <= pat;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      count <= '0;
      saved <= 1'b0;
    end else begin
      saved <= wr;
      if (wr) count <= count + 1'b1;
    end
  end

endmodule
