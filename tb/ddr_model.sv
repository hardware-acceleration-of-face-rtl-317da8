// ddr_model: behavioural model of the external DDR memory seen through an
// AXI4-style read channel (address: valid/ready, address, len = beats-1;
// data: valid/ready, data, last). It holds DEPTH 128-bit words, which the
// testbench fills through the mem array. It accepts one request at a time
// and inserts random wait cycles on both channels when STALLS is set.
// It counts accepted bursts in n_bursts.
module ddr_model #(
  parameter int DEPTH  = 4096,
  parameter bit STALLS = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ar_valid,
  output logic         ar_ready,
  input  logic [31:0]  ar_addr,
  input  logic [7:0]   ar_len,
  output logic         r_valid,
  input  logic         r_ready,
  output logic [127:0] r_data,
  output logic         r_last
);
  logic [127:0] mem [DEPTH];
  logic         active;
  logic [31:0]  addr;
  logic [8:0]   left;
  int           n_bursts;
  logic         stall;

  always_comb begin
    ar_ready = !active && !stall;
    r_valid  = active && !stall;
    r_data   = mem[(addr >> 4) % DEPTH];
    r_last   = left == 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 0; addr <= 0; left <= 0; n_bursts <= 0; stall <= 0;
    end else begin
      stall <= STALLS && ($urandom_range(0, 3) == 0);
      if (ar_valid && ar_ready) begin
        active   <= 1;
        addr     <= ar_addr;
        left     <= 9'(ar_len) + 1;
        n_bursts <= n_bursts + 1;
      end
      if (r_valid && r_ready) begin
        addr <= addr + 16;
        left <= left - 1;
        if (left == 1) active <= 0;
      end
    end
  end
endmodule
