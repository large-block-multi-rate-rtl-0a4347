// dram_model: behavioural model of the external memory, for testbenches.
//
// Not synthesizable logic: stands in for a DDR memory and its controller.
// Page commands are always accepted. A write command is followed by C data
// beats (one per wr_valid), stored at consecutive tuple addresses. A read
// command returns C beats from consecutive addresses, starting LAT cycles
// after the command, in command order, one beat per cycle. Never-written
// addresses read as zero. Counts written and read pages for the testbench.
module dram_model
  import sort_pkg::*;
#(
  parameter int unsigned P   = 4,
  parameter int unsigned AW  = 16,
  parameter int unsigned C   = 4,
  parameter int unsigned LAT = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic          cmd_write,
  input  logic [AW-1:0] cmd_addr,
  input  logic          wr_valid,
  input  pair_t [P-1:0] wr_data,
  output logic          rd_valid,
  output pair_t [P-1:0] rd_data
);

  pair_t [P-1:0] mem [logic [AW-1:0]];
  logic [AW-1:0] wr_addr;
  longint        now = 0;
  logic [AW-1:0] rq_addr [$];
  longint        rq_due  [$];
  int            rbeat = 0;
  int            pages_written = 0, pages_read = 0;

  assign cmd_ready = 1'b1;

  always @(posedge clk) begin
    now <= now + 1;
    rd_valid <= 1'b0;
    if (!rst_n) begin
      rq_addr.delete();
      rq_due.delete();
      rbeat = 0;
    end else begin
      if (cmd_valid && cmd_write) begin
        wr_addr <= cmd_addr;
        pages_written++;
      end else if (cmd_valid) begin
        rq_addr.push_back(cmd_addr);
        rq_due.push_back(now + LAT);
        pages_read++;
      end
      if (wr_valid) begin
        mem[wr_addr] = wr_data;
        wr_addr <= wr_addr + AW'(1);
      end
      if (rq_addr.size() > 0 && rq_due[0] <= now) begin
        logic [AW-1:0] a;
        a = rq_addr[0] + AW'(rbeat);
        rd_valid <= 1'b1;
        rd_data  <= mem.exists(a) ? mem[a] : '0;
        rbeat++;
        if (rbeat == int'(C)) begin
          rbeat = 0;
          void'(rq_addr.pop_front());
          void'(rq_due.pop_front());
        end
      end
    end
  end

endmodule
