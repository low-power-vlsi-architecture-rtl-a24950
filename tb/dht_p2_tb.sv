// dht_p2_tb: streams random complex groups through the P2 stage and checks
// every output against the butterfly worked out in double precision (see
// dht_stage_check), including the flush of the last group by non-live samples.
module dht_p2_tb;
  dht_stage_check #(.KIND(2), .L(4)) u_check ();
endmodule
