E3A00002
E3A01001
E3A02015
E3E03004
E3A0503B
E0824181
E0456002
E2607C01
E205800F
E1888402
E0289003
E3C994FF
E1A0A0C3
E1A0B075
E1B0C0A1
01A0C065
13A0C055
E293D005
E0ADD000
E051E000
E2CEE000
E1500001
C28EE001
E3730005
13A0E000
E3300002
028DD010
E3150004
128DDC01
E0060295
E0271295
E0898093
E0CBA093
E3A04000
E3A0C005
EB000002
E25CC001
1AFFFFFC
EA000001
E084400C
E1A0F00E
E3A00A01
E3A01001
E580100C
E3A01007
E5801008
E3A010A5
E5801000
E5902004
E3120002
0AFFFFFC
E5903000
E5902004
E3A05A02
E3A01C01
E5851008
E3A0103C
E5851000
E5956004
E3160001
1AFFFFFC
E5957000
E3A01001
E5851008
E790E101
E3A08A01
E4989008
E5B8A004
E3A0B011
E108B09B
E598C000
E518D004
EAFFFFFE
