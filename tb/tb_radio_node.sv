// tb_radio_node: end-to-end test of two radio nodes at reduced sizes
// (see link_bench): bit period of 400 clocks, ADC serial
// clock at a quarter of the system clock, 64-sample moving average. The whole
// sequence is described in link_bench.
module tb_radio_node;
  link_bench #(.FULL (1'b0), .DIV (400), .AVGL2 (6), .ASH (2), .MSG_LEN (24)) u_bench ();
endmodule
