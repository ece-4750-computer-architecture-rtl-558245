// parc_regfile: architectural register file with four read and two write ports.
//
// The D stage reads two source operands for each of the two instructions of a
// fetch block (four read ports); the W stage writes back the results of the A
// and B pipes (two write ports), as the course notes require. Register 0 reads
// as zero and ignores writes. Reads are combinational and see a write made in
// the same cycle (write-before-read), so the W stage needs no bypass path of
// its own; that forwarding is this design's choice. The two write ports never
// target the same register in one cycle, because the issue logic never sends
// two instructions with the same destination down the pipes together; an
// assertion checks it.
//
// Timing: writes take effect at the rising clock edge; reads are
// combinational. The array is cleared by reset.
module parc_regfile
  import parc_pkg::*;
#(
  parameter int unsigned NREAD  = 4,
  parameter int unsigned NWRITE = 2
) (
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t raddr [NREAD],
  output word_t    rdata [NREAD],
  input  logic     wen   [NWRITE],
  input  reg_idx_t waddr [NWRITE],
  input  word_t    wdata [NWRITE]
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NWRITE; w++)
        if (wen[w] && waddr[w] != '0) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb begin
    for (int r = 0; r < NREAD; r++) begin
      rdata[r] = regs[raddr[r]];
      for (int w = 0; w < NWRITE; w++)
        if (wen[w] && waddr[w] == raddr[r]) rdata[r] = wdata[w];
      if (raddr[r] == '0) rdata[r] = '0;
    end
  end

  // Two write ports never name the same register in one cycle
  assert property (@(posedge clk) disable iff (rst)
                   !(wen[0] && wen[1] && waddr[0] == waddr[1] && waddr[0] != '0))
    else $error("parc_regfile: two writes to r%0d in one cycle", waddr[0]);

endmodule
