// dm09a_model: behavioural model of the DM09A adapter multiplexer and the
// PDP-9 core memory behind it, for the benches of the data port.
//
// Three data-channel ports with fixed priority: port 0 (the disk) above
// port 1 (the analog data port); the third port is unused here. Each memory
// cycle takes CYCLE_CLK clocks. When a cycle is free the highest-priority
// requesting port is granted; at the end of the cycle the port's word is
// written to mem[addr] and that port gets a one-clock ack. disk_req models
// the disk's own requests, whose addresses land in a separate region.
// stalls counts the clocks during which the analog port waited because the
// disk held the channel.
`timescale 1ns/1ps
module dm09a_model #(
  parameter int unsigned CYCLE_CLK = 10    // 1 us memory cycle at 10 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        disk_req,
  output logic        disk_ack,
  input  logic        an_req,
  input  logic [14:0] an_addr,
  input  logic [17:0] an_data,
  output logic        an_ack
);

  logic [17:0] mem [32768];
  logic        busy;
  logic        owner;          // 0 disk, 1 analog
  logic [14:0] w_addr;
  logic [17:0] w_data;
  int unsigned left;
  int unsigned stalls;
  int unsigned disk_words;
  int unsigned an_words;
  logic [14:0] disk_addr;

  initial begin
    foreach (mem[i]) mem[i] = 18'o777777;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 0; owner <= 0; left <= 0; disk_ack <= 0; an_ack <= 0;
      stalls <= 0; disk_words <= 0; an_words <= 0; disk_addr <= 15'o60000;
      w_addr <= '0; w_data <= '0;
    end else begin
      disk_ack <= 0;
      an_ack   <= 0;
      if (busy) begin
        if (left == 1) begin
          busy <= 0;
          mem[w_addr] <= w_data;
          if (owner) begin an_ack <= 1; an_words <= an_words + 1; end
          else begin disk_ack <= 1; disk_words <= disk_words + 1; end
        end
        left <= left - 1;
        if (an_req && !owner) stalls <= stalls + 1;
      end else if (disk_req && !disk_ack) begin
        busy <= 1; owner <= 0; left <= CYCLE_CLK;
        w_addr <= disk_addr; w_data <= 18'o525252; disk_addr <= disk_addr + 1;
        if (an_req && !an_ack) stalls <= stalls + 1;
      end else if (an_req && !an_ack) begin
        busy <= 1; owner <= 1; left <= CYCLE_CLK;
        w_addr <= an_addr; w_data <= an_data;
      end
    end
  end

endmodule
