// Behavioural VME master used by the testbenches.
//
// Drives A32/D32 cycles with active-low strobes, changing its outputs on the
// falling clock edge so the slave samples them on the next rising edge.
// Tasks:
//   single(write, addr, am, wdata, rdata, berr, lat) - one transfer
//   block_read(addr, n, ...)  / block_write(addr, n, ...) - block transfers
// 'lat' is the number of rising clock edges from the data strobe's
// assertion to the clock on which DTACK or BERR is first seen low.
module vme_master (
  input  logic        clk,
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic        lword_n,
  output logic        iack_n,
  output logic [5:0]  am,
  output logic [31:1] addr,
  output logic [31:0] d_out,
  input  logic [31:0] d_in,
  input  logic        d_oe,
  input  logic        dtack_n,
  input  logic        berr_n
);
  localparam int TIMEOUT = 64;

  initial begin
    as_n    = 1'b1;
    ds_n    = 2'b11;
    write_n = 1'b1;
    lword_n = 1'b1;
    iack_n  = 1'b1;
    am      = '0;
    addr    = '0;
    d_out   = '0;
  end

  // Wait for DTACK or BERR, counting rising edges; returns at a falling edge.
  task automatic wait_ack(output bit berr, output int lat, output bit timeout);
    lat = 0; timeout = 0; berr = 0;
    forever begin
      @(posedge clk); lat++;
      @(negedge clk);
      if (!dtack_n || !berr_n) begin berr = !berr_n; return; end
      if (lat > TIMEOUT) begin timeout = 1; return; end
    end
  endtask

  task automatic wait_release();
    int n = 0;
    while ((!dtack_n || !berr_n) && n < TIMEOUT) begin @(negedge clk); n++; end
  endtask

  task automatic single(input bit wr, input logic [31:0] a, input logic [5:0] m,
                        input logic [31:0] wdata, output logic [31:0] rdata,
                        output bit berr, output int lat);
    bit to;
    @(negedge clk);
    addr = a[31:1]; am = m; write_n = !wr; lword_n = 1'b0; iack_n = 1'b1;
    d_out = wdata;
    @(negedge clk);
    as_n = 1'b0; ds_n = 2'b00;
    wait_ack(berr, lat, to);
    rdata = d_oe ? d_in : 32'hDEAD_BEEF;
    if (to) lat = -1;
    as_n = 1'b1; ds_n = 2'b11;
    wait_release();
    @(negedge clk);
  endtask

  // Block read of n words; rdata[i], berr flags and latencies per beat.
  task automatic block_read(input logic [31:0] a, input int n,
                            output logic [31:0] rdata[$], output bit berr[$], output int lat[$]);
    bit b, to; int l;
    rdata.delete(); berr.delete(); lat.delete();
    @(negedge clk);
    addr = a[31:1]; am = 6'h0B; write_n = 1'b1; lword_n = 1'b0; iack_n = 1'b1;
    @(negedge clk);
    as_n = 1'b0;
    for (int i = 0; i < n; i++) begin
      ds_n = 2'b00;
      wait_ack(b, l, to);
      rdata.push_back(d_oe ? d_in : 32'hDEAD_BEEF);
      berr.push_back(b); lat.push_back(to ? -1 : l);
      ds_n = 2'b11;
      wait_release();
      @(negedge clk);
      if (b) break;
    end
    as_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic block_write(input logic [31:0] a, input logic [31:0] wdata[$],
                             output bit berr[$], output int lat[$]);
    bit b, to; int l;
    berr.delete(); lat.delete();
    @(negedge clk);
    addr = a[31:1]; am = 6'h0B; write_n = 1'b0; lword_n = 1'b0; iack_n = 1'b1;
    @(negedge clk);
    as_n = 1'b0;
    foreach (wdata[i]) begin
      d_out = wdata[i];
      ds_n = 2'b00;
      wait_ack(b, l, to);
      berr.push_back(b); lat.push_back(to ? -1 : l);
      ds_n = 2'b11;
      wait_release();
      @(negedge clk);
      if (b) break;
    end
    as_n = 1'b1;
    write_n = 1'b1;
    @(negedge clk);
  endtask

endmodule
