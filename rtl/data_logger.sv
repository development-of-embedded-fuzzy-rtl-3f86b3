// data_logger: data-logging loop towards the real-time processor.
//
// Each motor channel presents one log record per control step (wr_req pulse
// with wr_rec). Requests are held in a per-channel pending register and moved,
// one per clock in fixed channel order (lowest first), into a DEPTH-entry FIFO
// that the processor side drains. DEPTH defaults to 32, the largest array the
// target tool flow recommends. When a record reaches a full FIFO it is
// dropped and the dropped counter (saturating) counts it; a new request on a
// channel whose previous record is still pending replaces it and is also
// counted as dropped.
//
// Read side is show-ahead: rd_valid says rd_rec holds the oldest record; a
// rd_en pulse while rd_valid removes it. level is the number of stored
// records.
module data_logger
  import flc_pkg::*;
#(
  parameter int NCH   = 2,
  parameter int DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NCH-1:0]             wr_req,
  input  log_rec_t                   wr_rec [NCH],
  input  logic                       rd_en,
  output logic                       rd_valid,
  output log_rec_t                   rd_rec,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic [15:0]                dropped
);
  localparam int AW = $clog2(DEPTH);
  localparam int LW = $clog2(DEPTH + 1);

  log_rec_t       mem [DEPTH];
  log_rec_t       pend_rec [NCH];
  logic [NCH-1:0] pend;
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic           push, pop, full;
  int             sel;
  logic [1:0]     drop_now;

  always_comb begin
    full = (level == LW'(DEPTH));
    sel  = -1;
    for (int c = NCH - 1; c >= 0; c--)
      if (pend[c]) sel = c;
    push = (sel >= 0) && !full;
    pop  = rd_en && rd_valid;
    // records lost this clock: one arriving at a full FIFO, one overwritten
    drop_now = '0;
    if (sel >= 0 && full) drop_now = drop_now + 2'd1;
    for (int c = 0; c < NCH; c++)
      if (wr_req[c] && pend[c] && c != sel) drop_now = drop_now + 2'd1;
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= pend_rec[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend    <= '0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      level   <= '0;
      dropped <= '0;
      for (int c = 0; c < NCH; c++) pend_rec[c] <= '0;
    end else begin
      // the selected record leaves the pending register whether stored or dropped
      if (sel >= 0) pend[sel] <= 1'b0;
      for (int c = 0; c < NCH; c++)
        if (wr_req[c]) begin
          pend[c]     <= 1'b1;
          pend_rec[c] <= wr_rec[c];
        end
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      level <= level + LW'(push) - LW'(pop);
      if (dropped + 16'(drop_now) < dropped) dropped <= '1;
      else                                   dropped <= dropped + 16'(drop_now);
    end
  end

  always_comb begin
    rd_valid = (level != '0);
    rd_rec   = mem[rd_ptr];
  end
endmodule
