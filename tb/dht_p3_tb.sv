// dht_p3_tb: streams random complex groups through the P3 stage and checks
// every output against the butterfly worked out in double precision (see
// dht_stage_check), including the flush of the last group by non-live samples.
module dht_p3_tb;
  dht_stage_check #(.KIND(3), .L(8)) u_check ();
endmodule
