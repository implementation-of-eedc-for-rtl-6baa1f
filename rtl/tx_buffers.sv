// tx_buffers: transmit message buffers of the controller host interface.
//
// N_TX_BUF buffers each hold one frame as bytes: 5 header bytes (indicator
// bits, frame ID, payload length, header CRC, cycle count, packed MSB first
// in transmit order) followed by up to 254 payload bytes. The host writes
// bytes through the write port and marks a buffer ready with 'commit'
// (commit_val = 0 withdraws it). The frame ID of each buffer is kept in a
// register copied from header bytes 0 and 1 as they are written, so the
// buffer for the current slot can be found at once: 'hit'/'hit_buf' give the
// lowest-numbered ready buffer whose frame ID equals 'slot_id'
// (combinational). The bitstream encoder reads bytes through a read port
// with one clock of latency. A ready buffer stays ready, so its frame is
// sent in every cycle until withdrawn.
//
// The document gives the number of buffers (up to 128) and that each holds
// one frame of variable payload length; the byte layout, the ready flag and
// the slot lookup are this design's own.
module tx_buffers
  import flexray_pkg::*;
#(
  parameter int unsigned N_TX_BUF = 128,
  localparam int unsigned BW = $clog2(N_TX_BUF)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host side
  input  logic          wr_en,
  input  logic [BW-1:0] wr_buf,
  input  logic [8:0]    wr_addr,
  input  logic [7:0]    wr_data,
  input  logic          commit,
  input  logic [BW-1:0] commit_buf,
  input  logic          commit_val,
  output logic [N_TX_BUF-1:0] ready,
  // protocol engine side
  input  logic [10:0]   slot_id,
  output logic          hit,
  output logic [BW-1:0] hit_buf,
  input  logic [BW-1:0] rd_buf,
  input  logic [8:0]    rd_addr,
  output logic [7:0]    rd_data
);

  logic [7:0]  mem [N_TX_BUF][MAX_DATA];
  logic [10:0] fid [N_TX_BUF];

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < 9'(MAX_DATA)) mem[wr_buf][wr_addr] <= wr_data;
    rd_data <= mem[rd_buf][(rd_addr < 9'(MAX_DATA)) ? rd_addr : 9'd0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= '0;
      for (int i = 0; i < N_TX_BUF; i++) fid[i] <= '0;
    end else begin
      if (wr_en && wr_addr == 9'd0) fid[wr_buf][10:8] <= wr_data[2:0];
      if (wr_en && wr_addr == 9'd1) fid[wr_buf][7:0]  <= wr_data;
      if (commit) ready[commit_buf] <= commit_val;
    end
  end

  always_comb begin
    hit     = 1'b0;
    hit_buf = '0;
    for (int i = N_TX_BUF - 1; i >= 0; i--)
      if (ready[i] && fid[i] == slot_id) begin
        hit     = 1'b1;
        hit_buf = BW'(i);
      end
  end

endmodule
