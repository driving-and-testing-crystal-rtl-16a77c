// tb_radio_node_full: the end-to-end test of link_bench with both nodes
// built at their default parameters (1000 clocks per bit, 256-sample
// moving average, ADC and DAC serial clocks at 1/8 of the system clock);
// step 1 carries the largest message, 125 octets, and the other steps
// 30-octet messages.
module tb_radio_node_full;
  link_bench #(.FULL (1'b1), .MSG_LEN (30)) u_bench ();
endmodule
