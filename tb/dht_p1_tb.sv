// dht_p1_tb: streams random complex groups through the P1 stage and checks
// every output against the butterfly worked out in double precision (see
// dht_stage_check), including the flush of the last group by non-live samples.
module dht_p1_tb;
  dht_stage_check #(.KIND(1), .L(2)) u_check ();
endmodule
