0badf00d
959a89bc
37c3036f
d10b9d1e
737016c9
1cb89078
bee12a2b
5829a3da
fa163d85
845eb734
258730e7
c7cfca96
61344441
037cddf0
aca557a3
4eedd152
e8da6b1d
8a02e4cc
144b7e7f
b5b3f82e
57f871d9
f1210b88
9369853b
3d561eea
de9e9895
78c71244
1a0fabf7
a47425a6
45bcbf51
e7e53900
812db2b3
231a4c62
cd42c62d
6e8b5fdc
08f3d98f
aa38533e
3460ece9
d5a96698
7791e04b
11de79fa
b306f3a5
5d4f8d54
feb40707
98fc80b6
3a251a61
c46d9410
665a2dc3
0782a772
a1cb213d
4333baec
ed78349f
8ea0ce4e
28e947f9
cad1c1a8
541e5b5b
f646d50a
978f6eb5
31f7e864
d33c6217
7d64fbc6
1ead7571
b89a0f20
5ac288d3
e40b0282
