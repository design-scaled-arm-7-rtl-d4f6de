E3A00002
E3A01001
E3A02015
E3E03004
E3A04022
E3A0503B
E3A06001
E3A07004
E0854006
E1A0B004
EAFFFFFE
